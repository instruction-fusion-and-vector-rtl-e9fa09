// Self-checking test of the ring shuffle network: every cycle each of the
// four lanes sends one packet, the destinations of one cycle forming a
// random permutation (the pattern rule). Each packet must come out at its
// destination lane with its address and data, N = 4 clock edges after it
// was presented (entry row plus N-1 switching stages), with no conflict.
// A final cycle breaks the rule and must raise 'conflict'.
module tb_shuffle_net;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] in_valid = 0;
  logic [1:0]   in_lane [N];
  logic [7:0]   in_addr [N];
  logic [31:0]  in_data [N];
  logic [N-1:0] out_valid;
  logic [7:0]   out_addr [N];
  logic [31:0]  out_data [N];
  logic         conflict;

  shuffle_net #(.N(N), .AW(8), .DW(32)) dut (.*);

  typedef struct { logic v; logic [7:0] a; logic [31:0] d; } exp_t;
  exp_t hist [int][N];   // expected output per arrival cycle and lane
  int cyc = 0;
  int conflicts = 0;
  always @(posedge clk) cyc++;

  // new entries of the expectation table start with every lane empty
  function automatic void expect_pkt(int t, int lane, logic [7:0] a, logic [31:0] d);
    if (!hist.exists(t))
      for (int c = 0; c < N; c++) hist[t][c] = '{v: 0, a: 0, d: 0};
    hist[t][lane] = '{v: 1, a: a, d: d};
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask

  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < N; c++) begin
      exp_t e;
      e = hist.exists(cyc) ? hist[cyc][c] : '{v: 0, a: 0, d: 0};
      chk(out_valid[c] == e.v, $sformatf("lane %0d valid", c));
      if (e.v) chk(out_addr[c] == e.a && out_data[c] == e.d, $sformatf("lane %0d packet %h %h exp %h %h", c, out_addr[c], out_data[c], e.a, e.d));
    end
    if (conflict) begin conflicts++; $display("conflict @%0d", cyc); end
  end

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0;
    for (int c = 0; c < N; c++) begin in_lane[c] = 0; in_addr[c] = 0; in_data[c] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 500; i++) begin
      automatic int perm [N];
      for (int c = 0; c < N; c++) perm[c] = c;
      for (int c = N - 1; c > 0; c--) begin
        automatic int j = $urandom_range(0, c);
        automatic int t = perm[c]; perm[c] = perm[j]; perm[j] = t;
      end
      for (int c = 0; c < N; c++) begin
        in_valid[c] = 1'($urandom_range(0, 4) != 0);
        in_lane[c] = 2'(perm[c]);
        in_addr[c] = 8'($urandom());
        in_data[c] = $urandom();
        if (in_valid[c]) expect_pkt(cyc + N, perm[c], in_addr[c], in_data[c]);
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (N + 2) @(negedge clk);
    chk(conflicts == 0, "no conflict under the pattern rule");
    // rule broken: lanes 0 and 1 both send to lane 1
    rst_n = 1;
    in_valid = 4'b0011; in_lane[0] = 1; in_lane[1] = 1;
    expect_pkt(cyc + N, 1, in_addr[0], in_data[0]);   // the travelling packet wins
    @(negedge clk);
    in_valid = 0;
    repeat (N + 2) @(negedge clk);
    chk(conflicts > 0, "conflict flagged when two packets meet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
