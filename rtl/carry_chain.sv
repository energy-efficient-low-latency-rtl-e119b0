// carry_chain: generic model of an FPGA fast carry chain (mux/xor per bit).
//
// Bit i: s[i] = p[i] ^ c[i]; c[i+1] = p[i] ? c[i] : g[i]; c[0] = cin.
// With p = x ^ y and g = x (or g = y) the chain adds x + y + cin; a LUT in
// front of each bit computes p and g. The chain is the vendor's dedicated
// carry logic; it is written here as plain logic so the design runs on any
// simulator or synthesis tool. Combinational, delay linear in W.
module carry_chain #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] p,
  input  logic [W-1:0] g,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    assign s[i]   = p[i] ^ c[i];
    assign c[i+1] = p[i] ? c[i] : g[i];
  end

  assign cout = c[W];

endmodule
