// tb_nmu_top: end-to-end test of the Universal NMU at its default size
// (32 logical connections).
//
// The host port first programs all 32 rules: connection c owns MAC
// 02:00:00:00:01:c, IPv4 10.0.1.c, port 6000+c, VLAN 100 for odd c and none
// for even c, and virtual network 1 (c < 16) or 2 (c >= 16). Connection 31 is
// left disabled; connection 5 may only reach 10.0.1.0/24, the others
// 10.0.0.0/16. Then application and network traffic run at the same time:
//   egress to a remote host        -> network, tag inserted after the MACs
//   egress to a local connection   -> back to the applications (internal
//                                     routing), untouched, with its conn id
//   egress to a local endpoint in another virtual network -> network
//   spoofed source / forbidden destination / disabled connection -> dropped
//   ingress with a valid tag for a connection -> tag removed, delivered
//   ingress without tag, with a foreign virtual network, or not IPv4 -> dropped
// Every output packet is compared with one computed here from the packet
// description and the rules; the pass/drop/loop counters are compared with
// the expected numbers. Each mechanism (tagging, de-tagging, internal
// routing, each drop reason, back-pressure on both outputs, contention in the
// ingress merge) is counted and must happen at least once. The first-beat
// latency of a 64-byte UDP packet is checked with no other traffic: 11
// cycles on egress, 12 on ingress. Bursts of back-to-back packets check the
// line rate: one beat per cycle, plus the beat the tag sometimes adds.
module tb_nmu_top;
  import nmu_pkg::*;
  import nmu_tb_pkg::*;

  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cfg_we;
  logic [7:0]  cfg_conn;
  logic [3:0]  cfg_addr;
  logic [31:0] cfg_wdata, cfg_rdata;
  logic        app_tx_valid, app_tx_ready, net_tx_valid, net_tx_ready;
  logic        net_rx_valid, net_rx_ready, app_rx_valid, app_rx_ready;
  beat_t       app_tx_beat, net_tx_beat, net_rx_beat, app_rx_beat;
  logic [7:0]  app_tx_conn, app_rx_conn;
  logic [31:0] eg_pass_cnt, eg_drop_cnt, in_pass_cnt, in_drop_cnt, loop_cnt;

  nmu_top dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // ---- connection plan ----
  function automatic logic [47:0] c_mac(int c);  return {40'h02_00_00_00_01, 8'(c)}; endfunction
  function automatic logic [31:0] c_ip(int c);   return {24'h0A_00_01, 8'(c)};      endfunction
  function automatic logic [15:0] c_port(int c); return 16'(6000 + c);              endfunction
  function automatic logic [11:0] c_vid(int c);  return (c % 2) ? 12'd100 : 12'd0;  endfunction
  function automatic logic [11:0] c_vnid(int c); return c < 16 ? 12'd1 : 12'd2;     endfunction

  task automatic cfg_write(int c, int a, logic [31:0] d);
    cfg_we <= 1; cfg_conn <= 8'(c); cfg_addr <= 4'(a); cfg_wdata <= d;
    @(posedge clk);
  endtask

  // ---- mechanism counters ----
  typedef enum int {M_TAG, M_LOOP, M_XVN, M_SRC, M_DST, M_CONN,
                    M_DETAG, M_NOTAG, M_NODEST, M_NOTIP,
                    M_BP_NET, M_BP_APP, M_CONTEND, M_NUM} mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"tag inserted", "internal routing", "other virtual network",
                               "source ACL drop", "destination ACL drop", "disabled connection drop",
                               "tag removed", "missing tag drop", "no valid destination drop",
                               "non-IPv4 drop", "network back-pressure", "application back-pressure",
                               "ingress merge contention"};

  always @(posedge clk) if (rst_n) begin
    if (net_tx_valid && !net_tx_ready) mech[M_BP_NET]++;
    if (app_rx_valid && !app_rx_ready) mech[M_BP_APP]++;
    if (dut.arb_valid == 2'b11) mech[M_CONTEND]++;
  end

  // ---- expected outputs ----
  bq_t        exp_net [$];
  bq_t        exp_loop [$];
  logic [7:0] exp_loop_conn [$];
  bq_t        exp_in [$];
  logic [7:0] exp_in_conn [$];
  int exp_eg_drop = 0, exp_in_drop = 0, exp_eg_pass = 0, exp_in_pass = 0, exp_loops = 0;
  int n_net_got = 0, n_app_got = 0;
  bit bp_on = 0;
  int t_eg_in = -1, t_eg_out = -1, t_in_in = -1, t_in_out = -1;

  always @(posedge clk) begin
    net_tx_ready <= !bp_on || $urandom_range(0, 3) != 0;
    app_rx_ready <= !bp_on || $urandom_range(0, 3) != 0;
  end

  // network-side monitor
  initial begin
    bq_t got;
    forever begin
      @(posedge clk);
      if (rst_n && net_tx_valid && net_tx_ready) begin
        if (t_eg_out < 0) t_eg_out = cyc;
        for (int j = 0; j < 8; j++) if (net_tx_beat.keep[j]) got.push_back(net_tx_beat.data[j*8 +: 8]);
        if (net_tx_beat.last) begin
          check(exp_net.size() > 0 && same(got, exp_net[0]), $sformatf("network packet %0d", n_net_got));
          if (exp_net.size() > 0) void'(exp_net.pop_front());
          n_net_got++;
          got.delete();
        end
      end
    end
  end

  // application-side monitor: each packet is the next internally routed
  // packet or the next delivered network packet
  initial begin
    bq_t got;
    logic [7:0] conn;
    forever begin
      @(posedge clk);
      if (rst_n && app_rx_valid && app_rx_ready) begin
        if (t_in_out < 0) t_in_out = cyc;
        if (got.size() == 0) conn = app_rx_conn;
        check(app_rx_conn == conn, "conn id constant within packet");
        for (int j = 0; j < 8; j++) if (app_rx_beat.keep[j]) got.push_back(app_rx_beat.data[j*8 +: 8]);
        if (app_rx_beat.last) begin
          if (exp_loop.size() > 0 && same(got, exp_loop[0]) && conn == exp_loop_conn[0]) begin
            void'(exp_loop.pop_front()); void'(exp_loop_conn.pop_front());
            check(1, "");
          end else if (exp_in.size() > 0 && same(got, exp_in[0]) && conn == exp_in_conn[0]) begin
            void'(exp_in.pop_front()); void'(exp_in_conn.pop_front());
            check(1, "");
          end else check(0, $sformatf("application packet %0d", n_app_got));
          n_app_got++;
          got.delete();
        end
      end
    end
  end

  logic tx_rdy_n, rx_rdy_n;
  always @(negedge clk) begin tx_rdy_n = app_tx_ready; rx_rdy_n = net_rx_ready; end

  task automatic send_app(bq_t q, int conn, bit first);
    for (int b = 0; b < n_beats(q); b++) begin
      app_tx_valid <= 1; app_tx_beat <= get_beat(q, b); app_tx_conn <= 8'(conn);
      @(posedge clk);
      while (!tx_rdy_n) @(posedge clk);
      if (first && b == 0) t_eg_in = cyc;
    end
  endtask

  task automatic send_net(bq_t q, bit first);
    for (int b = 0; b < n_beats(q); b++) begin
      net_rx_valid <= 1; net_rx_beat <= get_beat(q, b);
      @(posedge clk);
      while (!rx_rdy_n) @(posedge clk);
      if (first && b == 0) t_in_in = cyc;
    end
  endtask

  function automatic bq_t tag_of(logic [11:0] vnid);
    bq_t t;
    t.push_back(8'h88); t.push_back(8'hA8); t.push_back({4'h0, vnid[11:8]}); t.push_back(vnid[7:0]);
    return t;
  endfunction

  // one egress packet of a random kind; returns it and records expectations
  task automatic make_egress(output bq_t q, output int s, input int kind);
    pkt_spec_t sp;
    int t;
    s = $urandom_range(0, N - 2);
    sp = default_spec();
    sp.src_mac = c_mac(s); sp.src_ip = c_ip(s); sp.sport = c_port(s);
    sp.vlan = c_vid(s) != 0; sp.vid = c_vid(s);
    sp.len = $urandom_range(60, 200);
    sp.proto = $urandom_range(0, 1) ? PROTO_UDP : PROTO_TCP;
    sp.dst_mac = 48'h02_00_00_00_09_99;           // gateway
    sp.dst_ip  = {16'h0A00, 8'($urandom_range(2, 255)), 8'($urandom())};
    if (s == 5) sp.dst_ip = {24'h0A0001, 8'(100 + $urandom_range(0, 99))};
    sp.dport = 16'($urandom_range(1, 9000));
    case (kind)
      1, 2: begin  // local destination, same VLAN; kind 2: other virtual network
        do t = $urandom_range(0, N - 2);
        while (t == s || (t % 2) != (s % 2) || (c_vnid(t) == c_vnid(s)) == (kind == 2));
        sp.dst_mac = c_mac(t); sp.dst_ip = c_ip(t); sp.dport = c_port(t);
      end
      3: sp.src_ip[0] = ~sp.src_ip[0];
      4: sp.dst_ip = 32'h0B00_0001;
      5: s = N - 1;
      default: ;
    endcase
    if (kind == 5) begin
      sp.src_mac = c_mac(s); sp.src_ip = c_ip(s); sp.sport = c_port(s);
      sp.vlan = c_vid(s) != 0; sp.vid = c_vid(s);
    end
    q = build_pkt(sp);
    case (kind)
      0, 2: begin
        exp_net.push_back(ins_bytes(q, 12, tag_of(c_vnid(s))));
        exp_eg_pass++;
        mech[kind == 0 ? M_TAG : M_XVN]++;
        if (kind == 2) mech[M_TAG]++;
      end
      1: begin
        exp_loop.push_back(q);
        exp_loop_conn.push_back(sp.dst_mac[7:0]);
        exp_eg_pass++; exp_loops++;
        mech[M_LOOP]++;
      end
      3: begin exp_eg_drop++; mech[M_SRC]++;  end
      4: begin exp_eg_drop++; mech[M_DST]++;  end
      5: begin exp_eg_drop++; mech[M_CONN]++; end
      default: ;
    endcase
  endtask

  task automatic make_ingress(output bq_t q, input int kind);
    pkt_spec_t sp;
    bq_t raw;
    int t;
    t = $urandom_range(0, N - 2);
    sp = default_spec();
    sp.dst_mac = c_mac(t); sp.dst_ip = c_ip(t); sp.dport = c_port(t);
    sp.vlan = c_vid(t) != 0; sp.vid = c_vid(t);
    sp.src_mac = 48'h02_00_00_00_09_99;
    sp.src_ip = {16'h0A00, 8'($urandom_range(2, 255)), 8'($urandom())};
    sp.sport = 16'($urandom_range(1, 9000));
    sp.len = $urandom_range(60, 200);
    if (kind == 3) sp.l3_type = 16'h0806;
    raw = build_pkt(sp);
    case (kind)
      1: q = raw;                                            // no tag
      2: q = ins_bytes(raw, 12, tag_of(c_vnid(t) ^ 12'd3));  // foreign network
      default: q = ins_bytes(raw, 12, tag_of(c_vnid(t)));
    endcase
    case (kind)
      0: begin
        exp_in.push_back(raw); exp_in_conn.push_back(8'(t));
        exp_in_pass++; mech[M_DETAG]++;
      end
      1: begin exp_in_drop++; mech[M_NOTAG]++;  end
      2: begin exp_in_drop++; mech[M_NODEST]++; end
      3: begin exp_in_drop++; mech[M_NOTIP]++;  end
      default: ;
    endcase
  endtask

  bit eg_done = 0, in_done = 0;
  localparam int NPKT = 400;

  initial begin
    cfg_we = 0; cfg_conn = 0; cfg_addr = 0; cfg_wdata = 0;
    app_tx_valid = 0; app_tx_beat = '0; app_tx_conn = 0;
    net_rx_valid = 0; net_rx_beat = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int c = 0; c < N; c++) begin
      cfg_write(c, 1, c_mac(c)[31:0]);
      cfg_write(c, 2, {4'd0, c_vid(c), c_mac(c)[47:32]});
      cfg_write(c, 3, c_ip(c));
      cfg_write(c, 4, {4'd0, c_vnid(c), c_port(c)});
      cfg_write(c, 7, c == 5 ? 32'h0A00_0100 : 32'h0A00_0000);
      cfg_write(c, 8, c == 5 ? 32'hFFFF_FF00 : 32'hFFFF_0000);
      cfg_write(c, 0, {29'd0, 1'b1, 1'b1, c != N - 1});   // rport_any, rmac_any, valid
    end
    cfg_we <= 0;
    @(posedge clk);
    cfg_conn <= 8'd7; cfg_addr <= 4'd3;
    @(posedge clk);
    #1 check(cfg_rdata == c_ip(7), "rule read-back");

    // latency: one 64-byte packet each way, nothing else in flight
    begin
      bq_t q;
      pkt_spec_t sp;
      sp = default_spec();
      sp.src_mac = c_mac(2); sp.src_ip = c_ip(2); sp.sport = c_port(2);
      sp.dst_ip = 32'h0A00_0505;
      q = build_pkt(sp);
      exp_net.push_back(ins_bytes(q, 12, tag_of(c_vnid(2))));
      exp_eg_pass++;
      send_app(q, 2, 1);
      app_tx_valid <= 0;
      repeat (30) @(posedge clk);
      check(t_eg_out - t_eg_in == 11, $sformatf("egress latency %0d", t_eg_out - t_eg_in));
      sp = default_spec();
      sp.dst_mac = c_mac(4); sp.dst_ip = c_ip(4); sp.dport = c_port(4);
      q = build_pkt(sp);
      exp_in.push_back(q); exp_in_conn.push_back(8'd4); exp_in_pass++;
      send_net(ins_bytes(q, 12, tag_of(c_vnid(4))), 1);
      net_rx_valid <= 0;
      repeat (30) @(posedge clk);
      check(t_in_out - t_in_in == 12, $sformatf("ingress latency %0d", t_in_out - t_in_in));
    end
    // line rate: bursts of back-to-back packets in each direction, no
    // back-pressure; the input must take one beat per cycle except where the
    // tag makes the output packet one beat longer than the input packet
    begin
      int t0, budget;
      budget = 0;
      t0 = cyc;
      for (int p = 0; p < 40; p++) begin
        bq_t q;
        pkt_spec_t sp;
        sp = default_spec();
        sp.src_mac = c_mac(2); sp.src_ip = c_ip(2); sp.sport = c_port(2);
        sp.dst_ip = {16'h0A00, 8'($urandom_range(2, 255)), 8'($urandom())};
        sp.len = $urandom_range(60, 300);
        q = build_pkt(sp);
        exp_net.push_back(ins_bytes(q, 12, tag_of(c_vnid(2))));
        exp_eg_pass++;
        budget += n_beats(exp_net[$]);
        send_app(q, 2, 0);
      end
      app_tx_valid <= 0;
      $display("egress burst: %0d beats in %0d cycles", budget, cyc - t0);
      check(cyc - t0 <= budget + 2, $sformatf("egress rate: %0d cycles for %0d beats", cyc - t0, budget));
      repeat (60) @(posedge clk);
      budget = 0;
      t0 = cyc;
      for (int p = 0; p < 40; p++) begin
        bq_t q;
        pkt_spec_t sp;
        int t;
        t = $urandom_range(0, N - 2);
        sp = default_spec();
        sp.dst_mac = c_mac(t); sp.dst_ip = c_ip(t); sp.dport = c_port(t);
        sp.vlan = c_vid(t) != 0; sp.vid = c_vid(t);
        sp.len = $urandom_range(60, 300);
        q = build_pkt(sp);
        exp_in.push_back(q); exp_in_conn.push_back(8'(t)); exp_in_pass++;
        q = ins_bytes(q, 12, tag_of(c_vnid(t)));
        budget += n_beats(q);
        send_net(q, 0);
      end
      net_rx_valid <= 0;
      $display("ingress burst: %0d beats in %0d cycles", budget, cyc - t0);
      check(cyc - t0 <= budget + 2, $sformatf("ingress rate: %0d cycles for %0d beats", cyc - t0, budget));
      repeat (60) @(posedge clk);
    end
    bp_on = 1;
    fork
      begin
        for (int p = 0; p < NPKT; p++) begin
          bq_t q;
          int s, kind;
          kind = $urandom_range(0, 9);
          kind = kind < 3 ? 0 : kind < 6 ? 1 : kind - 4;   // 0,1 common; 2..5 rarer
          make_egress(q, s, kind);
          send_app(q, s, 0);
        end
        app_tx_valid <= 0;
        eg_done = 1;
      end
      begin
        for (int p = 0; p < NPKT; p++) begin
          bq_t q;
          int kind;
          kind = $urandom_range(0, 7);
          kind = kind < 5 ? 0 : kind - 4;
          make_ingress(q, kind);
          send_net(q, 0);
        end
        net_rx_valid <= 0;
        in_done = 1;
      end
    join
    repeat (400) @(posedge clk);
    check(exp_net.size() == 0, "all network packets out");
    check(exp_loop.size() == 0, "all internally routed packets out");
    check(exp_in.size() == 0, "all delivered packets out");
    check(eg_pass_cnt == 32'(exp_eg_pass), $sformatf("egress pass count %0d/%0d", eg_pass_cnt, exp_eg_pass));
    check(eg_drop_cnt == 32'(exp_eg_drop), $sformatf("egress drop count %0d/%0d", eg_drop_cnt, exp_eg_drop));
    check(in_pass_cnt == 32'(exp_in_pass), "ingress pass count");
    check(in_drop_cnt == 32'(exp_in_drop), "ingress drop count");
    check(loop_cnt == 32'(exp_loops), "internal routing count");
    for (int m = 0; m < M_NUM; m++) begin
      $display("%-28s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, {"mechanism never happened: ", mech_name[m]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
