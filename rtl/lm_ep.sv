// lm_ep: error-part (EP) processing element of the logarithmic multiplier.
// It estimates the error term qa*qb without a multiplier:
//   * Comp compares qa and qb (sel = qa >= qb) and two multiplexers route the
//     larger one to Q1 and the smaller one to Q2;
//   * the nearest-one detector (Nod) rounds Q1 to a power of two: with its
//     leading one at k, the one-hot q1 has its bit at k+1 when Q1[k-1] is one
//     (overestimate) and at k otherwise (underestimate);
//   * a priority encoder turns q1 into the exponent e = log2(round(Q1));
//   * a barrel shifter forms comp = Q2 << e = round(Q1) * Q2.
// Rounding the larger operand is what the document chooses to lower the
// worst-case error. Because qa < 2^k1 and qb < 2^k2, comp < 2^(k1+k2), which
// lets the enclosing multiplier merge it with 2^(k1+k2) by an OR.
// When Q1 is zero, Q2 is zero too and comp is zero.
// Interface: qa, qb in (A - 2^k1 and B - 2^k2); comp out. Combinational.
module lm_ep #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   qa,
  input  logic [N-1:0]   qb,
  output logic [2*N-1:0] comp
);
  localparam int unsigned KW = $clog2(N);

  logic          sel;
  logic [N-1:0]  q1_val, q2_val;
  logic [N-1:0]  q1_oh;   // round(Q1) as a one-hot vector
  logic [KW-1:0] e;

  // nearest-one detector
  function automatic logic [N-1:0] nod(input logic [N-1:0] x);
    logic [N-1:0] oh;
    logic         seen;
    oh   = '0;
    seen = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      if (x[i] && !seen) begin
        if (i > 0 && x[i-1] && i < N - 1) oh[i+1] = 1'b1;  // round up
        else                              oh[i]   = 1'b1;  // round down
      end
      seen = seen | x[i];
    end
    return oh;
  endfunction

  always_comb begin
    sel    = (qa >= qb);                // Comp
    q1_val = sel ? qa : qb;             // larger
    q2_val = sel ? qb : qa;             // smaller
    q1_oh  = nod(q1_val);
    e      = '0;                        // priority encoder
    for (int i = 0; i < N; i++) begin
      if (q1_oh[i]) e = e | KW'(i);
    end
    comp   = (2*N)'(q2_val) << e;       // barrel shifter
  end
endmodule
