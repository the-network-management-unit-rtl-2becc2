// tb_pkt_inserter: self-checking test of the encapsulator/tagger.
//
// Sends random packets (1..100 bytes, so some end before the insertion
// point) with a random 4-byte insert value each, random input gaps and
// random output back-pressure. Each output packet must equal the input with
// the insert bytes placed at byte 12 (unchanged if the packet is 12 bytes or
// shorter), packed into full beats except the last. Also checks the one
// cycle first-beat latency and that a back-to-back stream of 64-byte packets
// keeps at least 8 bytes per cycle minus one cycle per packet.
module tb_pkt_inserter;
  import nmu_pkg::*;
  import nmu_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid, in_ready, out_valid, out_ready;
  beat_t in_beat, out_beat;
  logic [31:0] ins_data;
  int checks = 0, failures = 0, cyc = 0;
  bit bp_on = 0, gaps_on = 0;
  int t_in = -1, t_out = -1;
  int n_ins = 0, n_short = 0;

  pkt_inserter #(.OFF(12), .INS_BYTES(4)) dut (.*);

  always @(posedge clk) cyc <= cyc + 1;
  logic rdy_n;
  always @(negedge clk) rdy_n = in_ready;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  bq_t exp_q [$];
  localparam int NPKT = 800;
  localparam int NFAST = 50;   // first packets: 64 bytes, no gaps
  int t_fast_end = -1;

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
          check(exp_q.size() > 0 && same(got, exp_q[0]), $sformatf("packet %0d", p));
          if (exp_q.size() > 0) void'(exp_q.pop_front());
          got.delete();
          p++;
          if (p == NFAST) t_fast_end = cyc;
        end
      end
    end
    check(t_out - t_in == 1, $sformatf("latency %0d", t_out - t_in));
    // 50 packets of 68 bytes out = 9 beats each: at most 9*50 + a few cycles
    check(t_fast_end - t_in <= 9 * NFAST + 4, $sformatf("throughput %0d cycles", t_fast_end - t_in));
    check(n_ins > 0 && n_short > 0, "both insert and short packets seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_beat = '0; ins_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int p = 0; p < NPKT; p++) begin
      bq_t q, ins;
      pkt_spec_t s;
      logic [31:0] iv;
      s = default_spec();
      s.len = p < NFAST ? 64 : $urandom_range(1, 100);
      q = build_pkt(s);
      iv = $urandom();
      ins.delete();
      for (int k = 3; k >= 0; k--) ins.push_back(iv[k*8 +: 8]);
      if (q.size() > 12) begin exp_q.push_back(ins_bytes(q, 12, ins)); n_ins++; end
      else begin exp_q.push_back(q); n_short++; end
      if (p == NFAST) begin bp_on = 1; gaps_on = 1; end
      for (int b = 0; b < n_beats(q); b++) begin
        in_valid <= 1; in_beat <= get_beat(q, b); ins_data <= iv;
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
