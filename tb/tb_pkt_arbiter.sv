// tb_pkt_arbiter: self-checking test of the packet-level round-robin merge.
//
// Two sources send numbered packets of random length, with random gaps and
// random output back-pressure. Checks that packets are never interleaved,
// that each source's packets arrive whole and in order with their connection
// id, and that when both sources keep packets waiting the output alternates
// between them packet by packet. The merge adds no latency: a beat offered
// while the output is free leaves in the same cycle.
module tb_pkt_arbiter;
  import nmu_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] in_valid, in_ready;
  beat_t      in_beat [2];
  logic [7:0] in_conn [2];
  logic       out_valid, out_ready;
  beat_t      out_beat;
  logic [7:0] out_conn;
  int checks = 0, failures = 0;
  int n_alt = 0, n_both = 0;

  pkt_arbiter dut (.*);

  logic [1:0] rdy_n;
  always @(negedge clk) rdy_n = in_ready;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  localparam int NPKT = 400;
  int  next_pkt [2] = '{0, 0};
  int  next_beat[2] = '{0, 0};
  int  cur_src = -1, last_src = -1;
  bit  done_src [2] = '{0, 0};
  bit  bp_on = 0;

  always @(posedge clk) out_ready <= !bp_on || $urandom_range(0, 3) != 0;

  // monitor: beat data = {src, packet, beat}
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int s, p, b;
    s = int'(out_beat.data[63:56]);
    p = int'(out_beat.data[55:32]);
    b = int'(out_beat.data[31:0]);
    if (cur_src < 0) begin
      // packet start: if the other source also had a packet waiting, the
      // arbiter must not pick the source that sent the previous packet
      if (last_src >= 0 && s == last_src && in_valid[1 - s]) begin
        check(0, "round robin");
      end
      if (last_src >= 0 && in_valid[0] && in_valid[1]) begin
        n_both++;
        if (s != last_src) n_alt++;
      end
      cur_src = s;
    end
    check(s == cur_src, "no interleaving");
    check(p == next_pkt[s] && b == next_beat[s], $sformatf("order src %0d", s));
    check(out_conn == 8'(10 * s + p % 8), "conn id");
    next_beat[s]++;
    if (out_beat.last) begin
      next_pkt[s]++; next_beat[s] = 0; last_src = s; cur_src = -1;
    end
  end

  for (genvar g = 0; g < 2; g++) begin : g_src
    initial begin
      in_valid[g] = 0; in_beat[g] = '0; in_conn[g] = '0;
      wait (rst_n);
      @(posedge clk);
      for (int p = 0; p < NPKT; p++) begin
        int n;
        n = $urandom_range(1, 6);
        for (int b = 0; b < n; b++) begin
          beat_t bt;
          bt.data = {8'(g), 24'(p), 32'(b)};
          bt.keep = 8'hFF;
          bt.last = b == n - 1;
          in_valid[g] <= 1; in_beat[g] <= bt; in_conn[g] <= 8'(10 * g + p % 8);
          @(posedge clk);
          while (!rdy_n[g]) @(posedge clk);
          if (p > NPKT / 2 && $urandom_range(0, 5) == 0) begin
            in_valid[g] <= 0;
            @(posedge clk);
          end
        end
      end
      in_valid[g] <= 0;
      done_src[g] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (300) @(posedge clk);
    bp_on = 1;
    wait (done_src[0] && done_src[1]);
    repeat (10) @(posedge clk);
    check(next_pkt[0] == NPKT && next_pkt[1] == NPKT, "all packets delivered");
    check(n_both > 0 && n_alt == n_both, "alternates under contention");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
