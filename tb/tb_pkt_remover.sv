// tb_pkt_remover: self-checking test of the de-encapsulator/de-tagger.
//
// Sends random packets (1..100 bytes) with random input gaps and random
// output back-pressure. Each output packet must equal the input with bytes
// 12..15 removed, packed into full beats except the last. On the last output
// beat of each packet the tag side band must hold the removed bytes, or be
// marked invalid if the packet was too short to carry a whole tag. Also
// checks the one-cycle first-beat latency.
module tb_pkt_remover;
  import nmu_pkg::*;
  import nmu_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid, in_ready, out_valid, out_ready, out_tag_valid;
  beat_t in_beat, out_beat;
  logic [31:0] out_tag;
  int checks = 0, failures = 0, cyc = 0;
  bit bp_on = 0, gaps_on = 0;
  int t_in = -1, t_out = -1;
  int n_tag = 0, n_short = 0;

  pkt_remover #(.OFF(12), .REM_BYTES(4)) dut (.*);

  always @(posedge clk) cyc <= cyc + 1;
  logic rdy_n;
  always @(negedge clk) rdy_n = in_ready;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  bq_t exp_q [$];
  logic [32:0] exp_tag [$];   // {valid, tag}
  localparam int NPKT = 800;

  always @(posedge clk) out_ready <= !bp_on || $urandom_range(0, 3) != 0;

  initial begin
    bq_t got;
    int  p = 0;
    wait (rst_n);
    while (p < NPKT) begin
      @(posedge clk);
      if (out_valid && out_ready) begin
        if (t_out < 0) t_out = cyc;
        for (int j = 0; j < 8; j++) if (out_beat.keep[j]) got.push_back(out_beat.data[j*8 +: 8]);
        check(out_beat.last || out_beat.keep == 8'hFF, "full beats");
        if (out_beat.last) begin
          logic [32:0] et;
          check(exp_q.size() > 0 && same(got, exp_q[0]), $sformatf("packet %0d", p));
          if (exp_q.size() > 0) void'(exp_q.pop_front());
          et = exp_tag.pop_front();
          check(out_tag_valid == et[32], $sformatf("tag valid pkt %0d", p));
          if (et[32]) check(out_tag == et[31:0], $sformatf("tag pkt %0d", p));
          got.delete();
          p++;
        end
      end
    end
    check(t_out - t_in == 1, $sformatf("latency %0d", t_out - t_in));
    check(n_tag > 0 && n_short > 0, "tagged and short packets seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_beat = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int p = 0; p < NPKT; p++) begin
      bq_t q;
      pkt_spec_t s;
      s = default_spec();
      s.len = p == 0 ? 64 : $urandom_range(1, 100);
      q = build_pkt(s);
      for (int i = 12; i < 16 && i < q.size(); i++) q[i] = 8'($urandom());
      exp_q.push_back(del_bytes(q, 12, 4));
      if (q.size() >= 16) begin
        exp_tag.push_back({1'b1, q[12], q[13], q[14], q[15]});
        n_tag++;
      end else begin
        exp_tag.push_back('0);
        n_short++;
      end
      if (p == 1) begin bp_on = 1; gaps_on = 1; end
      for (int b = 0; b < n_beats(q); b++) begin
        in_valid <= 1; in_beat <= get_beat(q, b);
        @(posedge clk);
        while (!rdy_n) @(posedge clk);
        if (p == 0 && b == 0) t_in = cyc;
        if (gaps_on && $urandom_range(0, 3) == 0) begin
          in_valid <= 0;
          @(posedge clk);
        end
      end
    end
    in_valid <= 0;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
