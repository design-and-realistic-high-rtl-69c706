// sara_subadder: one W-bit sub-adder of the accuracy reconfigurable adder.
//
// A plain ripple-carry adder: each bit is a full adder whose carry feeds the
// next bit, so the carry out (co) is the accurate carry of the slice given
// its carry in (ci). The ripple structure follows the design description,
// which counts delay in one stage per bit against a carry-ripple adder; the
// generate/propagate form of each full adder is this design's own choice.
//
// Interface: a, b, ci in; s (W bits) and co out. Purely combinational,
// no clock, no latency.
module sara_subadder #(
  parameter int unsigned W = sara_pkg::SARA_SUB_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);

  logic [W:0] c;   // c[i] is the carry into bit i

  assign c[0] = ci;

  for (genvar i = 0; i < W; i++) begin : g_bit
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | ((a[i] ^ b[i]) & c[i]);
  end

  assign co = c[W];

endmodule
