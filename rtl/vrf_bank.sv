// One lane's slice of the vector register file: 256 single-precision
// elements with three read ports and two write ports.
//
// Read ports 0 and 1 serve the ALU decoder (two operands), read port 2
// the LDST unit (store data). Write port 0 serves the ALU write-back unit
// and write port 1 the load write-back unit. Reads are synchronous with an
// enable, as the document asks for power efficiency: the data appear one
// cycle after the address and hold while the enable is low. Writes take
// effect at the clock edge; a read of an address written in the same
// cycle returns the old value. If both write ports hit one address in one
// cycle, port 1 (load) wins; the hazard unit keeps this from happening.
module vrf_bank #(
  parameter int DEPTH = vp_pkg::VRF_DEPTH,
  parameter int AW    = 8
) (
  input  logic          clk,
  input  logic [2:0]    re,
  input  logic [AW-1:0] raddr [3],
  output logic [31:0]   rdata [3],
  input  logic [1:0]    we,
  input  logic [AW-1:0] waddr [2],
  input  logic [31:0]   wdata [2]
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int p = 0; p < 3; p++)
      if (re[p]) rdata[p] <= mem[raddr[p]];
    if (we[0]) mem[waddr[0]] <= wdata[0];
    if (we[1]) mem[waddr[1]] <= wdata[1];
  end

endmodule
