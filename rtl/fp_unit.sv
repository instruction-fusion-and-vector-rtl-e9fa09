// Lane floating-point execution unit with result buffer.
//
// One element operation may enter per cycle. Addition and subtraction
// take six pipeline stages and multiplication four, as the document gives
// for the open-source FP cores of a lane. The result buffer behind the
// multiplier holds each product for two more cycles so that every result
// leaves the unit exactly ADD_LAT cycles after it entered, in issue order;
// the single VRF write port behind the unit then never sees two results in
// one cycle. Holding products in the result buffer this way is this
// design's reading of the "Result Buffer" box of the lane figure. The
// arithmetic itself is computed in the first stage and carried through
// the remaining stages (a behavioural pipeline; the stage split of the
// original cores is not given). Side-band bits (tag) travel with the
// operation so the write-back unit knows where the result goes.
module fp_unit #(
  parameter int ADD_LAT = 6,
  parameter int MUL_LAT = 4,
  parameter int TAG_W   = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [1:0]       in_op,    // 0 add, 1 sub, 2 mul
  input  logic [31:0]      in_a,
  input  logic [31:0]      in_b,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [31:0]      out_res,
  output logic [TAG_W-1:0] out_tag
);
  import fp_pkg::*;

  typedef struct packed {
    logic             v;
    logic [31:0]      res;
    logic [TAG_W-1:0] tag;
  } stage_t;

  stage_t add_pipe [ADD_LAT];
  stage_t mul_pipe [MUL_LAT];
  stage_t rbuf     [ADD_LAT - MUL_LAT];   // result buffer

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ADD_LAT; i++) add_pipe[i] <= '0;
      for (int i = 0; i < MUL_LAT; i++) mul_pipe[i] <= '0;
      for (int i = 0; i < ADD_LAT - MUL_LAT; i++) rbuf[i] <= '0;
    end else begin
      add_pipe[0].v   <= in_valid && (in_op != 2'd2);
      add_pipe[0].res <= fp_add(in_a, in_b, in_op == 2'd1);
      add_pipe[0].tag <= in_tag;
      mul_pipe[0].v   <= in_valid && (in_op == 2'd2);
      mul_pipe[0].res <= fp_mul(in_a, in_b);
      mul_pipe[0].tag <= in_tag;
      for (int i = 1; i < ADD_LAT; i++) add_pipe[i] <= add_pipe[i-1];
      for (int i = 1; i < MUL_LAT; i++) mul_pipe[i] <= mul_pipe[i-1];
      rbuf[0] <= mul_pipe[MUL_LAT-1];
      for (int i = 1; i < ADD_LAT - MUL_LAT; i++) rbuf[i] <= rbuf[i-1];
    end
  end

  always_comb begin
    if (rbuf[ADD_LAT-MUL_LAT-1].v) begin
      out_valid = 1'b1;
      out_res   = rbuf[ADD_LAT-MUL_LAT-1].res;
      out_tag   = rbuf[ADD_LAT-MUL_LAT-1].tag;
    end else begin
      out_valid = add_pipe[ADD_LAT-1].v;
      out_res   = add_pipe[ADD_LAT-1].res;
      out_tag   = add_pipe[ADD_LAT-1].tag;
    end
  end

endmodule
