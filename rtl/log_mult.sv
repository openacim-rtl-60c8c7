// log_mult: unsigned N x N logarithmic multiplier with adder-free error
// compensation. It evaluates
//   P = ( 2^(k1+k2) | round(Q1)*Q2 ) + (A - 2^k1)*2^k2 + (B - 2^k2)*2^k1
// where k1, k2 are the leading-one positions of A and B and Q1, Q2 the
// larger and smaller of A - 2^k1 and B - 2^k2. lm_ap supplies 2^(k1+k2) and
// the two shifted terms (already added by Adder2), lm_ep the compensation
// round(Q1)*Q2. The compensation is below 2^(k1+k2), so an OR merges the two
// without a carry; Adder3 adds the result to the AP partial sum.
// With COMPENSATE = 0 the error part is dropped and only the approximate
// part remains.
// The equation, the OR merge and the block structure follow the document; the
// zero-operand rule (either operand zero gives a zero product, since a zero
// has no leading one) is this design's choice.
// Interface: a, b in; p out (2N bits). Purely combinational.
module log_mult #(
  parameter int unsigned N          = 8,
  parameter bit          COMPENSATE = 1'b1
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned KW = $clog2(N);

  logic [KW-1:0]  k1, k2;
  logic [N-1:0]   qa, qb;
  logic [2*N-1:0] pow, ap, comp, merged;

  lm_ap #(.N(N)) u_ap (
    .a(a), .b(b), .k1(k1), .k2(k2), .qa(qa), .qb(qb), .pow(pow), .ap(ap)
  );

  lm_ep #(.N(N)) u_ep (.qa(qa), .qb(qb), .comp(comp));

  // the exponents are used inside lm_ap only
  logic unused_k;
  assign unused_k = ^{k1, k2};

  always_comb begin
    merged = COMPENSATE ? (pow | comp) : pow;   // OR replaces an adder
    p      = (a == '0 || b == '0) ? '0 : merged + ap;  // Adder3
  end
endmodule
