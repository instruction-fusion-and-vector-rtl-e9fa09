// Self-checking test of the lane floating-point unit: random single
// precision add, sub and mul against a double-precision reference rounded to single precision,
// the 6-cycle result latency (result registered at the sixth clock edge
// after the operands were presented) for every operation (products wait in the
// result buffer), in-order results under back-to-back issue, and tags.
module tb_fp_unit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid = 0;
  logic [1:0]  in_op = 0;
  logic [31:0] in_a = 0, in_b = 0;
  logic [15:0] in_tag = 0;
  logic        out_valid;
  logic [31:0] out_res;
  logic [15:0] out_tag;

  fp_unit dut (.*);

  typedef struct { logic [31:0] res; logic [15:0] tag; int t; } exp_t;
  exp_t q [$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  function automatic logic [31:0] rnd_fp();
    // normal numbers in a narrow exponent range: sums and products are
    // exact in double precision, so one rounding to single gives the
    // correctly rounded single-precision result
    return {1'($urandom_range(0, 1)), 8'($urandom_range(120, 135)), 23'($urandom())};
  endfunction

  // single -> double, exact
  function automatic real s2r(logic [31:0] a);
    logic [63:0] d;
    if (a[30:23] == 0) return 0.0;
    d = {a[31], 11'(int'(a[30:23]) - 127 + 1023), a[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction
  // double -> single, round to nearest even (normal range only)
  function automatic logic [31:0] r2s(real r);
    logic [63:0] d;
    logic [52:0] m;
    logic [24:0] k;
    int e;
    d = $realtobits(r);
    if (d[62:0] == 0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:0]};
    k = {1'b0, m[52:29]};
    if (m[28] && (m[27:0] != 0 || m[29])) k = k + 1;
    if (k[24]) begin k = k >> 1; e++; end
    return {d[63], 8'(e), k[22:0]};
  endfunction
  function automatic logic [31:0] ref_op(logic [1:0] op, logic [31:0] a, logic [31:0] b);
    case (op)
      2'd0: return r2s(s2r(a) + s2r(b));
      2'd1: return r2s(s2r(a) - s2r(b));
      default: return r2s(s2r(a) * s2r(b));
    endcase
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // result monitor
  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    if (q.size() == 0) chk(0, "unexpected result");
    else begin
      e = q.pop_front();
      chk(out_res == e.res, $sformatf("result %h expected %h", out_res, e.res));
      chk(out_tag == e.tag, "tag");
      chk(cyc - e.t == 6, $sformatf("latency %0d, expected 6", cyc - e.t));
    end
  end

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // directed: 1.5 + 2.25, 3 * -2, 1 - 1
    for (int i = 0; i < 3000; i++) begin
      in_valid = (i < 3) ? 1'b1 : 1'($urandom_range(0, 3) != 0);
      case (i)
        0: begin in_op = 0; in_a = 32'h3fc00000; in_b = 32'h40100000; end
        1: begin in_op = 2; in_a = 32'h40400000; in_b = 32'hc0000000; end
        2: begin in_op = 1; in_a = 32'h3f800000; in_b = 32'h3f800000; end
        default: begin
          in_op = 2'($urandom_range(0, 2)); in_a = rnd_fp(); in_b = rnd_fp();
        end
      endcase
      in_tag = 16'($urandom());
      if (in_valid) q.push_back('{res: ref_op(in_op, in_a, in_b), tag: in_tag, t: cyc});
      @(negedge clk);
    end
    in_valid = 0;
    repeat (10) @(negedge clk);
    chk(q.size() == 0, "all results returned");
    chk(ref_op(0, 32'h3fc00000, 32'h40100000) == 32'h40700000, "reference sanity");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
