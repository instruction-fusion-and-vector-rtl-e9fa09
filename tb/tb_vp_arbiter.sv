// Self-checking test of the round-robin arbitrator with four real FIFOs in
// front of it. Each core pushes a random stream of instructions, some with
// an operand word. Checks: every packet arrives with its own operand (an
// instruction and its data are never split), each core's packets stay in
// order, the cores are served in round-robin order when all are busy, the
// sink's back-pressure is respected, and an instruction alone takes two
// cycles through the two arbitration stages (three with an operand).
module tb_vp_arbiter;
  import vp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0]  fifo_empty, fifo_rd, f_full, f_wr;
  logic [31:0] fifo_data [4];
  logic [31:0] f_wdata [4];
  logic        out_valid, out_ready = 1;
  vpkt_t       out_pkt;
  logic [1:0]  out_port;

  vp_arbiter dut (.*);
  for (genvar g = 0; g < 4; g++) begin : g_f
    vinstr_fifo u_f (.clk, .rst_n, .wr_en(f_wr[g]), .wr_data(f_wdata[g]), .rd_en(fifo_rd[g]),
                     .rd_data(fifo_data[g]), .empty(fifo_empty[g]), .full(f_full[g]), .count());
  end

  vpkt_t exp_q [4][$];
  int    served = 0;
  logic [1:0] ports [$];
  int    cyc = 0;
  always @(posedge clk) cyc++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask

  function automatic logic [31:0] rnd_ins(int core, int seq);
    vinstr_t i;
    i = vinstr_t'($urandom());
    i.op = vop_e'($urandom_range(0, 11));
    i.tid = 2'(core);
    i.spare = 8'(seq);
    return i;
  endfunction

  // sink
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    vpkt_t e;
    if (exp_q[out_port].size() == 0) chk(0, "packet from an idle core");
    else begin
      e = exp_q[out_port].pop_front();
      chk(out_pkt == e, $sformatf("core %0d packet %h exp %h", out_port, out_pkt, e));
      chk(out_pkt.ins.tid == out_port, "packet from its own core");
    end
    served++;
    ports.push_back(out_port);
  end

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t0;
    f_wr = 0;
    for (int g = 0; g < 4; g++) f_wdata[g] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // latency: one instruction without operand into an empty system
    f_wr[2] = 1; f_wdata[2] = {OP_VADD, 28'h0000400};
    exp_q[2].push_back('{ins: vinstr_t'({OP_VADD, 28'h0000400}), data: 0});
    @(negedge clk); f_wr = 0;
    t0 = cyc;
    wait (out_valid); #1;
    chk(cyc - t0 == 2, $sformatf("plain instruction through arbiter in %0d cycles", cyc - t0));
    @(negedge clk);
    // one with an operand
    f_wr[1] = 1; f_wdata[1] = {OP_VLD, 28'h0000200};
    @(negedge clk); f_wdata[1] = 32'h0000_0123;
    exp_q[1].push_back('{ins: vinstr_t'({OP_VLD, 28'h0000200}), data: 32'h123});
    @(negedge clk); f_wr = 0;
    t0 = cyc - 1;
    wait (out_valid); #1;
    chk(cyc - t0 == 3, $sformatf("instruction with operand in %0d cycles", cyc - t0));
    repeat (3) @(negedge clk);
    // round robin: four full FIFOs of plain instructions, sink always ready
    served = 0; ports = {};
    for (int k = 0; k < 4; k++) begin
      for (int g = 0; g < 4; g++) begin
        f_wr[g] = 1; f_wdata[g] = {OP_VADD, 19'd0, 2'(g), 8'(k), 1'b0};
        exp_q[g].push_back('{ins: vinstr_t'(f_wdata[g]), data: 0});
      end
      @(negedge clk);
    end
    f_wr = 0;
    repeat (40) @(negedge clk);
    chk(ports.size() == 16, "all sixteen served");
    for (int k = 1; k < ports.size(); k++)
      chk(ports[k] == 2'(ports[k-1] + 1), "round-robin order");
    // random streams with random back-pressure
    for (int i = 0; i < 3000; i++) begin
      out_ready = 1'($urandom_range(0, 3) != 0);
      for (int g = 0; g < 4; g++) begin
        f_wr[g] = 0;
      end
      for (int g = 0; g < 4; g++) if (!f_full[g] && f_full[g] == 0 && $urandom_range(0, 2) == 0) begin
        // push instruction and, if needed, its operand over two cycles (other cores idle)
        automatic logic [31:0] w = rnd_ins(g, i);
        automatic vpkt_t p;
        p.ins = vinstr_t'(w); p.data = 0;
        if (g_f_count(g) < 14) begin
          f_wr[g] = 1; f_wdata[g] = w;
          if (has_data(p.ins.op)) begin
            @(negedge clk);
            f_wr = '0; f_wr[g] = 1; f_wdata[g] = $urandom(); p.data = f_wdata[g];
          end
          exp_q[g].push_back(p);
        end
        break;
      end
      @(negedge clk);
      f_wr = 0;
    end
    out_ready = 1;
    repeat (200) @(negedge clk);
    for (int g = 0; g < 4; g++) chk(exp_q[g].size() == 0, $sformatf("core %0d drained", g));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int g_f_count(int g);
    case (g)
      0: return int'(g_f[0].u_f.count);
      1: return int'(g_f[1].u_f.count);
      2: return int'(g_f[2].u_f.count);
      default: return int'(g_f[3].u_f.count);
    endcase
  endfunction

  // handshake rule: a packet offered stays unchanged until it is taken
  vpkt_t held;
  logic  was_blocked = 0;
  always @(posedge clk) if (rst_n) begin
    if (was_blocked) chk(out_valid && out_pkt == held, "packet held under back-pressure");
    was_blocked <= out_valid && !out_ready;
    held <= out_pkt;
  end
endmodule
