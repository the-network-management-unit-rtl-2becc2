// tb_hdr_parser_chain: self-checking test of the MAC/VLAN/IPv4/transport
// parser chain.
//
// Sends random frames (tagged and untagged, IHL 5..7, UDP, TCP, other
// protocols, non-IPv4, frames cut short inside the headers) with random gaps
// and random back-pressure. For every frame it checks that the data leaves
// unchanged and that the header record on the last beat holds the fields and
// valid flags computed here from the frame description. Also checks the
// four-cycle latency of the chain with no back-pressure.
module tb_hdr_parser_chain;
  import nmu_pkg::*;
  import nmu_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid, in_ready, out_valid, out_ready;
  beat_t in_beat, out_beat;
  hdr_t  in_hdr, out_hdr;
  int checks = 0, failures = 0;

  hdr_parser_chain dut (.*);

  localparam int NPKT = 300;
  pkt_spec_t specs [NPKT];
  bq_t       pkts  [NPKT];
  int        cyc = 0;
  int        t_first_in = -1, t_first_out = -1;
  bit        bp_on = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int p = 0; p < NPKT; p++) begin
      pkt_spec_t s;
      int kind;
      s = default_spec();
      s.vlan   = $urandom_range(0, 1);
      s.vid    = 12'($urandom_range(1, 4095));
      s.ihl    = 4'($urandom_range(5, 7));
      s.src_mac = {16'h0200, $urandom()};
      s.dst_mac = {16'h0200, $urandom()};
      s.src_ip = $urandom(); s.dst_ip = $urandom();
      s.sport  = 16'($urandom()); s.dport = 16'($urandom());
      kind = $urandom_range(0, 9);
      s.proto  = kind < 4 ? PROTO_UDP : kind < 8 ? PROTO_TCP : 8'd1;
      if ($urandom_range(0, 9) == 0) s.l3_type = 16'h86DD;
      s.len    = $urandom_range(60, 130);
      if ($urandom_range(0, 9) == 0) s.len = $urandom_range(10, 40);
      specs[p] = s;
      pkts[p]  = build_pkt(s);
    end
    // first packet: plain, no back-pressure, used for the latency check
    specs[0] = default_spec();
    pkts[0]  = build_pkt(specs[0]);
  end

  // driver
  initial begin
    in_valid = 0; in_beat = '0; in_hdr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int p = 0; p < NPKT; p++) begin
      for (int b = 0; b < n_beats(pkts[p]); b++) begin
        in_valid <= 1; in_beat <= get_beat(pkts[p], b);
        in_hdr <= '0;
        in_hdr.src_conn <= 8'(p);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (p == 0 && b == 0) t_first_in = cyc;
        if (p > 0 && $urandom_range(0, 3) == 0) begin
          in_valid <= 0;
          @(posedge clk);
        end
      end
    end
    in_valid <= 0;
  end

  // back-pressure after the first packet
  always @(posedge clk) out_ready <= !bp_on || ($urandom_range(0, 3) != 0);

  // monitor
  initial begin
    bq_t got;
    int  p = 0;
    wait (rst_n);
    while (p < NPKT) begin
      @(posedge clk);
      if (out_valid && out_ready) begin
        if (t_first_out < 0) t_first_out = cyc;
        for (int j = 0; j < 8; j++) if (out_beat.keep[j]) got.push_back(out_beat.data[j*8 +: 8]);
        if (out_beat.last) begin
          pkt_spec_t s;
          bit hdr_in, l3ok, ipok, l4ok;
          int l3, ipend, l4end;
          s = specs[p];
          check(same(got, pkts[p]), $sformatf("data pkt %0d", p));
          check(out_hdr.src_conn == 8'(p), "side band passes");
          l3    = s.vlan ? 18 : 14;
          ipend = l3 + 20;
          l4end = l3 + 4 * int'(s.ihl) + 4;
          check(out_hdr.v_mac == (s.len >= 12), $sformatf("v_mac pkt %0d", p));
          if (s.len >= 12) begin
            check(out_hdr.dst_mac == s.dst_mac && out_hdr.src_mac == s.src_mac, "macs");
          end
          l3ok = s.len >= l3;
          check(out_hdr.v_l3 == l3ok, $sformatf("v_l3 pkt %0d", p));
          if (l3ok) begin
            check(out_hdr.has_vlan == s.vlan, "has_vlan");
            if (s.vlan) check(out_hdr.vid == s.vid, "vid");
            check(out_hdr.l3_type == s.l3_type, "l3_type");
          end
          ipok = l3ok && s.l3_type == ETH_IPV4 && s.len >= ipend;
          check(out_hdr.v_ip == ipok, $sformatf("v_ip pkt %0d", p));
          if (ipok) begin
            check(out_hdr.src_ip == s.src_ip && out_hdr.dst_ip == s.dst_ip, "ips");
            check(out_hdr.proto == s.proto, "proto");
            check(out_hdr.l4_off == 8'(l3 + 4 * int'(s.ihl)), "l4_off");
          end
          l4ok = ipok && (s.proto == PROTO_UDP || s.proto == PROTO_TCP) && s.len >= l4end;
          check(out_hdr.v_l4 == l4ok, $sformatf("v_l4 pkt %0d", p));
          if (l4ok) check(out_hdr.src_port == s.sport && out_hdr.dst_port == s.dport,
                          $sformatf("ports pkt %0d", p));
          if (p == 0) begin
            check(t_first_out - t_first_in == 4,
                  $sformatf("latency %0d != 4", t_first_out - t_first_in));
            bp_on = 1;
          end
          got.delete();
          p++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
