// Host-to-VM mux: the host side of the vector memory.
//
// The hosts see the four VM banks as one memory with a continuous word
// address space, low-order interleaved across the active banks. With
// 2^L active lanes (lanes_log2 = L from the lane-state register) the low L
// bits of the host word address select the bank and the remaining bits are
// the bank-local address (document, Figure 9.1: with four lanes bits 1:0
// select, with two lanes bit 0 selects). When lvp_hi is set (thread-state
// register, Section 9.2) the most significant bank-address bit is flipped
// so the host reaches the upper-half VM space of the second logical VP.
// Host reads return data one cycle after the request (rd_valid), from
// the bank selected in the request cycle.
// In two- and four-lane mode the top one or two bits of the shifted host
// address fall off the bank address; they are unused by design, since the
// host word address space is exactly the size of the active banks.
module vm_host_mux #(
  parameter int NBANKS = 4,
  parameter int AW     = 12      // bank address width
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [1:0]               lanes_log2,
  input  logic                     lvp_hi,
  // host port (word addressed)
  input  logic                     h_en,
  input  logic                     h_we,
  input  logic [AW+1:0]            h_addr,
  input  logic [31:0]              h_wdata,
  output logic [31:0]              h_rdata,
  output logic                     h_rvalid,
  // bank port B
  output logic [NBANKS-1:0]        b_en,
  output logic                     b_we,
  output logic [AW-1:0]            b_addr,
  output logic [31:0]              b_wdata,
  input  logic [31:0]              b_rdata [NBANKS]
);
  logic [$clog2(NBANKS)-1:0] sel, sel_q;

  always_comb begin
    logic [AW+1:0] a;
    case (lanes_log2)
      2'd0:    begin sel = '0;               a = h_addr;      end
      2'd1:    begin sel = {1'b0, h_addr[0]}; a = h_addr >> 1; end
      default: begin sel = h_addr[1:0];      a = h_addr >> 2; end
    endcase
    b_addr = a[AW-1:0];
    if (lvp_hi) b_addr[AW-1] = ~b_addr[AW-1];
    b_en       = '0;
    b_en[sel]  = h_en;
    b_we       = h_we;
    b_wdata    = h_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q    <= '0;
      h_rvalid <= 1'b0;
    end else begin
      h_rvalid <= h_en && !h_we;
      if (h_en) sel_q <= sel;
    end
  end

  assign h_rdata = b_rdata[sel_q];

endmodule
