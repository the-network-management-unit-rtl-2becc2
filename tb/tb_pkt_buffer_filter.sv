// tb_pkt_buffer_filter: self-checking test of the packet buffer and filter.
//
// Sends random packets (1..40 beats, longer than the buffer) with random
// gaps and random output back-pressure. Each packet's verdict (drop or pass,
// with a tag in the conn field) is issued at a random beat of that packet,
// as the verdict stage does. Checks that exactly the passing packets leave,
// whole, in order and with their own verdict beside every beat, that dropped
// packets never show on the output, and the pass/drop counters. Also checks
// the latency: a passing packet whose verdict comes with its first beat
// leaves two cycles after that beat is accepted.
module tb_pkt_buffer_filter;
  import nmu_pkg::*;

  localparam int DEPTH = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid, in_ready, out_valid, out_ready, verdict_valid;
  beat_t in_beat, out_beat;
  verdict_t verdict, out_verdict;
  logic [31:0] pass_cnt, drop_cnt;
  int checks = 0, failures = 0, cyc = 0;
  int exp_pass = 0, exp_drop = 0;
  bit bp_on = 0;
  int t_in = -1, t_out = -1;

  pkt_buffer_filter #(.DEPTH(DEPTH)) dut (.*);

  always @(posedge clk) cyc <= cyc + 1;
  // ready as seen at the coming clock edge (it does not depend on valid)
  logic rdy_n;
  always @(negedge clk) rdy_n = in_ready;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  beat_t    exp_b [$];
  verdict_t exp_v [$];

  always @(posedge clk) out_ready <= !bp_on || $urandom_range(0, 2) != 0;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (t_out < 0) t_out = cyc;
    check(exp_b.size() > 0, "unexpected beat");
    if (exp_b.size() > 0) begin
      beat_t e;
      e = exp_b.pop_front();
      check(out_beat == e, $sformatf("beat data %h exp %h", out_beat.data[63:32], e.data[63:32]));
      check(out_verdict == exp_v.pop_front(), "verdict beside beat");
    end
  end

  initial begin
    in_valid = 0; in_beat = '0; verdict_valid = 0; verdict = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int p = 0; p < 600; p++) begin
      int n, vb;
      verdict_t v;
      n  = p == 0 ? 4 : $urandom_range(1, 40);
      vb = p == 0 ? 0 : $urandom_range(0, n - 1);
      if (vb > 12) vb = 12 < n ? 12 : n - 1;
      v = '0;
      v.drop = p == 0 ? 1'b0 : ($urandom_range(0, 2) == 0);
      v.conn = 8'(p);
      if (v.drop) exp_drop++; else exp_pass++;
      for (int b = 0; b < n; b++) begin
        beat_t bt;
        bt.data = {8'(p), 24'(b), $urandom()};
        bt.keep = b == n - 1 ? 8'h0F : 8'hFF;
        bt.last = b == n - 1;
        in_valid <= 1; in_beat <= bt;
        if (!v.drop) begin exp_b.push_back(bt); exp_v.push_back(v); end
        @(posedge clk);
        while (!rdy_n) @(posedge clk);
        if (p == 0 && b == 0) t_in = cyc;
        // verdict follows the beat that decides it by one cycle
        if (b == vb) begin verdict_valid <= 1; verdict <= v; end
        if ($urandom_range(0, 4) == 0) begin
          in_valid <= 0;
          @(posedge clk);
          verdict_valid <= 0;
        end
        if (b == vb) begin
          in_valid <= 0;
          @(posedge clk);
          verdict_valid <= 0;
        end
      end
      if (p == 0) begin
        in_valid <= 0;
        repeat (10) @(posedge clk);
        check(t_out - t_in == 2, $sformatf("latency %0d", t_out - t_in));
        bp_on = 1;
      end
    end
    in_valid <= 0;
    repeat (200) @(posedge clk);
    check(exp_b.size() == 0, "all passing beats delivered");
    check(pass_cnt == 32'(exp_pass), "pass counter");
    check(drop_cnt == 32'(exp_drop), "drop counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
