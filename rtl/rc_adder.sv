// Reversible ripple-carry adder: a chain of W MTS gates, wired as in the
// reference drawing.
//
// Gate k takes a[k], b[k], the carry out of gate k-1 (cin for gate 0) and a
// constant 0. Its third output is sum[k] and its fourth output is the carry
// into gate k+1; the carry of the last gate is cout. The first two outputs
// of each gate are garbage and are collected on the garbage port, two bits
// per gate (gate k drives garbage[2k+1:2k]); garbage[2k] is a copy of a[k].
// Purely combinational; the delay grows linearly with W.
module rc_adder #(
  parameter int W = 8
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic           cin,
  output logic [W-1:0]   sum,
  output logic           cout,
  output logic [2*W-1:0] garbage
);
  logic carry [W+1];
  assign carry[0] = cin;

  for (genvar k = 0; k < W; k++) begin : g_cell
    mts_gate u_mts (
      .a(a[k]), .b(b[k]), .c(carry[k]), .d(1'b0),
      .p(garbage[2*k]), .q(garbage[2*k+1]), .r(sum[k]), .s(carry[k+1])
    );
  end

  assign cout = carry[W];
endmodule
