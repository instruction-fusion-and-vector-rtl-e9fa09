// Round-robin vector instruction arbitrator between the application-core
// FIFOs and the vector controller.
//
// Stage 1 (arbitration) polls the non-empty FIFOs in round-robin order
// starting after the last one served, pops the instruction word and, for
// an instruction that carries an operand (vp_pkg::has_data), stays on the
// same FIFO to pop the operand word as well, so an instruction and its
// data are never split. Stage 2 (handshake) is an output register that
// offers the assembled {instruction, operand} packet to the vector
// controller with a valid/ready handshake. One 32-bit word moves from a
// FIFO per cycle. The document gives the round-robin policy, the two
// stages and the 32-bit transfers; the packet format and the handshake
// signals are this design's own.
module vp_arbiter #(
  parameter int NPORTS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // FWFT FIFO read side, one per application core
  input  logic [NPORTS-1:0] fifo_empty,
  input  logic [31:0]       fifo_data [NPORTS],
  output logic [NPORTS-1:0] fifo_rd,
  // to the vector controller
  output logic              out_valid,
  output vp_pkg::vpkt_t     out_pkt,
  output logic [$clog2(NPORTS)-1:0] out_port,
  input  logic              out_ready
);
  import vp_pkg::*;
  localparam int PW = $clog2(NPORTS);

  typedef enum logic [1:0] {S_PICK, S_DATA, S_HOLD} st_e;
  st_e            st;
  logic [PW-1:0]  cur, last;
  vinstr_t        ins_q;
  logic [31:0]    data_q;
  logic           pick_ok;
  logic [PW-1:0]  pick;

  // round-robin choice among non-empty FIFOs, starting after 'last'
  always_comb begin
    pick_ok = 1'b0;
    pick    = last;
    for (int k = 1; k <= NPORTS; k++) begin
      automatic logic [PW-1:0] idx = PW'((int'(last) + k) % NPORTS);
      if (!pick_ok && !fifo_empty[idx]) begin
        pick_ok = 1'b1;
        pick    = idx;
      end
    end
  end

  wire out_free = !out_valid || out_ready;

  always_comb begin
    fifo_rd = '0;
    case (st)
      S_PICK: if (pick_ok) fifo_rd[pick] = 1'b1;
      S_DATA: if (!fifo_empty[cur]) fifo_rd[cur] = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_PICK;
      cur       <= '0;
      last      <= PW'(NPORTS - 1);
      ins_q     <= '0;
      data_q    <= '0;
      out_valid <= 1'b0;
      out_pkt   <= '0;
      out_port  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      case (st)
        S_PICK: if (pick_ok) begin
          cur   <= pick;
          last  <= pick;
          ins_q  <= vinstr_t'(fifo_data[pick]);
          data_q <= '0;
          st    <= has_data(vop_e'(fifo_data[pick][31:28])) ? S_DATA : S_HOLD;
        end
        S_DATA: if (!fifo_empty[cur]) begin
          data_q <= fifo_data[cur];
          st           <= S_HOLD;
        end
        default: ;
      endcase
      if (st == S_HOLD && out_free) begin
        out_valid   <= 1'b1;
        out_pkt.ins <= ins_q;
        out_pkt.data <= data_q;
        out_port    <= cur;
        st          <= S_PICK;
      end
    end
  end

endmodule
