// lm_ap: approximate-part (AP) processing element of the logarithmic
// multiplier. Writing each operand as N = 2^k + q, with k the position of its
// leading one, the product is
//   A*B = 2^(k1+k2) + qa*2^k2 + qb*2^k1 + qa*qb.
// This block computes everything except the last (error) term:
//   * a leading-one detector and priority encoder per operand give k1, k2;
//   * XOR with the one-hot leading one strips it: qa = A - 2^k1,
//     qb = B - 2^k2;
//   * Adder1 forms k1 + k2 and a decoder turns it into pow = 2^(k1+k2);
//   * two barrel shifters form qa << k2 and qb << k1, and Adder2 adds them
//     into ap.
// The sub-blocks and their connections follow the document's block diagram
// of the logarithmic multiplier. For a zero operand k is 0 and q is 0; the
// enclosing multiplier forces the product to zero in that case.
// Interface: a, b in; k1, k2, qa, qb, pow, ap out. Purely combinational.
module lm_ap #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  output logic [$clog2(N)-1:0] k1,
  output logic [$clog2(N)-1:0] k2,
  output logic [N-1:0]         qa,
  output logic [N-1:0]         qb,
  output logic [2*N-1:0]       pow,
  output logic [2*N-1:0]       ap
);
  localparam int unsigned KW = $clog2(N);

  // leading-one detector: one-hot of the most significant set bit
  function automatic logic [N-1:0] lod(input logic [N-1:0] x);
    logic [N-1:0] oh;
    logic         seen;
    oh   = '0;
    seen = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      oh[i] = x[i] & ~seen;
      seen  = seen | x[i];
    end
    return oh;
  endfunction

  // priority encoder of a one-hot vector: OR of the set positions
  function automatic logic [KW-1:0] enc(input logic [N-1:0] oh);
    logic [KW-1:0] k;
    k = '0;
    for (int i = 0; i < N; i++) begin
      if (oh[i]) k = k | KW'(i);
    end
    return k;
  endfunction

  logic [N-1:0]  oha, ohb;
  logic [KW:0]   ksum;

  always_comb begin
    oha  = lod(a);
    ohb  = lod(b);
    k1   = enc(oha);
    k2   = enc(ohb);
    qa   = a ^ oha;                                  // XOR removes the leading one
    qb   = b ^ ohb;
    ksum = {1'b0, k1} + {1'b0, k2};                  // Adder1
    pow  = (2*N)'(1) << ksum;                        // decoder
    ap   = ((2*N)'(qa) << k2) + ((2*N)'(qb) << k1);  // barrel shifters, Adder2
  end
endmodule
