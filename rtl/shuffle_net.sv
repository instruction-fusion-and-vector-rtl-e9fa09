// Ring-based pipelined inter-lane data shuffle network.
//
// N lanes feed one packet each per cycle: {destination lane, lane-local
// VRF address, data}. The entry row (one node per lane) and N-1 switching
// stages follow; in each switching stage a packet that has not reached its
// destination lane moves one lane up the ring (lane N-1 wraps to lane 0),
// and a packet that has arrived stays in its lane in the node's bypass
// buffer. After N-1 stages every packet is in its destination lane and is
// handed to that lane's VRF write-back. Each node therefore holds at most
// a switching packet and a bypass packet, has a fan-in and fan-out of two,
// and the network accepts N packets per cycle and never stalls, provided
// the N packets that enter in one cycle go to N different lanes (the
// document's pattern rule, which the RLT reordering in the decoders makes
// hold). A violation is flagged on 'conflict' and the packet waiting in the bypass buffer is
// lost. Latency: a packet presented in cycle t leaves in cycle t+N-1
// (output taken from the last stage's registers).
module shuffle_net #(
  parameter int N  = 4,
  parameter int AW = 8,
  parameter int DW = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         in_valid,
  input  logic [$clog2(N)-1:0] in_lane [N],
  input  logic [AW-1:0]        in_addr [N],
  input  logic [DW-1:0]        in_data [N],
  output logic [N-1:0]         out_valid,
  output logic [AW-1:0]        out_addr [N],
  output logic [DW-1:0]        out_data [N],
  output logic                 conflict
);
  localparam int LW = $clog2(N);

  typedef struct packed {
    logic          v;
    logic [LW-1:0] lane;
    logic [AW-1:0] addr;
    logic [DW-1:0] data;
  } pkt_t;

  pkt_t sw [N][N];   // [stage][lane] switching buffers, stage 0 = entry row
  pkt_t bp [N][N];   // bypass buffers
  logic [N-1:0] clash;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N; s++)
        for (int c = 0; c < N; c++) begin
          sw[s][c] <= '0;
          bp[s][c] <= '0;
        end
      clash <= '0;
    end else begin
      clash <= '0;
      // entry row
      for (int c = 0; c < N; c++) begin
        automatic pkt_t p = '{v: in_valid[c], lane: in_lane[c], addr: in_addr[c], data: in_data[c]};
        if (p.v && p.lane == LW'(c)) begin
          bp[0][c] <= p;
          sw[0][c] <= '0;
        end else begin
          bp[0][c] <= '0;
          sw[0][c] <= p;
        end
      end
      // switching stages
      for (int s = 1; s < N; s++)
        for (int c = 0; c < N; c++) begin
          automatic pkt_t d = sw[s-1][(c + N - 1) % N];   // from the lane below
          automatic pkt_t b = bp[s-1][c];
          if (d.v && d.lane == LW'(c)) begin
            bp[s][c] <= d;
            sw[s][c] <= '0;
            if (b.v) clash[c] <= 1'b1;
          end else begin
            bp[s][c] <= b;
            sw[s][c] <= d;
          end
        end
    end
  end

  always_comb begin
    for (int c = 0; c < N; c++) begin
      out_valid[c] = bp[N-1][c].v;
      out_addr[c]  = bp[N-1][c].addr;
      out_data[c]  = bp[N-1][c].data;
    end
    conflict = |clash;
  end

endmodule
