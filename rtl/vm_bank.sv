// One bank of the vector memory: a true dual-port RAM of 4096 32-bit
// words (16 KB; four banks make the 64 KB VM).
//
// Port A belongs to the bank's own lane (LDST unit); port B to the host
// side through the host-to-VM mux. Both ports read synchronously (data one
// cycle after the address) and write at the clock edge. Simultaneous
// writes of one address from both ports leave port B's word; the document
// does not define this case.
module vm_bank #(
  parameter int WORDS = vp_pkg::VM_WORDS,
  parameter int AW    = 12
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [31:0]   b_wdata,
  output logic [31:0]   b_rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end

endmodule
