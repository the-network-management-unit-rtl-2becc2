// tb_nmu_check: self-checking test of the verdict stage, egress and ingress.
//
// Two instances share one random rule set of 32 connections: one with
// EGRESS=1 (ACLs plus internal-routing CAM), one with EGRESS=0 (tag check plus
// delivery CAM). Packets are given as beats with a header record whose
// fields are taken from the rules and then randomly disturbed; the header
// "completes" at a random beat or never. The expected verdict (drop, reason
// bits, local destination, connection) is computed here from the rules, and
// the testbench checks that exactly one verdict per packet arrives, one cycle
// after the beat that decides it, and that the beats pass unchanged.
module tb_nmu_check;
  import nmu_pkg::*;

  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  rule_t rules [N];
  logic  in_valid, e_in_ready, i_in_ready, out_ready;
  beat_t in_beat;
  hdr_t  in_hdr;
  logic  e_out_valid, i_out_valid, e_vv, i_vv;
  beat_t e_out_beat, i_out_beat;
  verdict_t e_v, i_v;
  int checks = 0, failures = 0;
  int n_local = 0, n_pass = 0, n_drop_in = 0, n_ok_in = 0;
  int reason_seen [6];

  nmu_check #(.N_CONN(N), .EGRESS(1'b1)) dut_e (
    .clk, .rst_n, .rules, .in_valid, .in_ready(e_in_ready), .in_beat, .in_hdr,
    .out_valid(e_out_valid), .out_ready, .out_beat(e_out_beat),
    .verdict_valid(e_vv), .verdict(e_v));
  nmu_check #(.N_CONN(N), .EGRESS(1'b0)) dut_i (
    .clk, .rst_n, .rules, .in_valid, .in_ready(i_in_ready), .in_beat, .in_hdr,
    .out_valid(i_out_valid), .out_ready, .out_beat(i_out_beat),
    .verdict_valid(i_vv), .verdict(i_v));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic int cam(hdr_t h, logic [11:0] vnid);
    for (int c = 0; c < N; c++)
      if (rules[c].valid && rules[c].mac == h.dst_mac && rules[c].ip == h.dst_ip &&
          rules[c].port == h.dst_port && rules[c].vnid == vnid &&
          (h.has_vlan ? (rules[c].vid == h.vid) : (rules[c].vid == 0)))
        return c;
    return -1;
  endfunction

  function automatic verdict_t exp_egress(hdr_t h, bit complete);
    verdict_t v;
    rule_t r;
    bit conn_ok, se, de;
    int hit;
    v = '0;
    conn_ok = h.src_conn < N && rules[h.src_conn].valid;
    r = h.src_conn < N ? rules[h.src_conn] : '0;
    se = h.src_mac != r.mac || h.src_ip != r.ip || h.src_port != r.port ||
         (h.has_vlan ? (r.vid == 0 || h.vid != r.vid) : r.vid != 0);
    de = !(r.rmac_any || h.dst_mac == r.rmac) ||
         ((h.dst_ip & r.rip_mask) != (r.rip & r.rip_mask)) ||
         !(r.rport_any || h.dst_port == r.rport);
    v.reason[0] = !conn_ok;
    v.reason[1] = !complete;
    v.reason[2] = complete && conn_ok && se;
    v.reason[3] = complete && conn_ok && de;
    v.drop = |v.reason;
    v.conn = h.src_conn;
    v.vnid = r.vnid;
    hit = cam(h, r.vnid);
    v.local_dst = hit >= 0;
    v.dst_conn  = hit >= 0 ? 8'(hit) : 8'd0;
    return v;
  endfunction

  function automatic verdict_t exp_ingress(hdr_t h, bit complete);
    verdict_t v;
    int hit;
    v = '0;
    hit = cam(h, h.tag_vnid);
    v.reason[1] = !complete;
    v.reason[4] = !h.tag_ok;
    v.reason[5] = complete && hit < 0;
    v.drop = |v.reason;
    v.conn = hit >= 0 ? 8'(hit) : 8'd0;
    v.vnid = h.tag_vnid;
    return v;
  endfunction

  verdict_t qe [$], qi [$];
  beat_t    qb_e [$], qb_i [$];

  // monitors
  always @(posedge clk) if (rst_n) begin
    if (e_vv) begin
      check(qe.size() > 0, "unexpected egress verdict");
      if (qe.size() > 0) begin
        verdict_t x;
        x = qe.pop_front();
        check(e_v == x, $sformatf("egress verdict %h != %h", e_v, x));
        for (int k = 0; k < 6; k++) if (e_v.reason[k]) reason_seen[k]++;
        if (!e_v.drop && e_v.local_dst) n_local++;
        if (!e_v.drop) n_pass++;
      end
    end
    if (i_vv) begin
      check(qi.size() > 0, "unexpected ingress verdict");
      if (qi.size() > 0) begin
        verdict_t x;
        x = qi.pop_front();
        check(i_v == x, $sformatf("ingress verdict %h != %h", i_v, x));
        for (int k = 0; k < 6; k++) if (i_v.reason[k]) reason_seen[k]++;
        if (i_v.drop) n_drop_in++; else n_ok_in++;
      end
    end
    if (e_out_valid && out_ready) begin
      check(qb_e.size() > 0 && e_out_beat == qb_e.pop_front(), "egress beat");
    end
    if (i_out_valid && out_ready) begin
      check(qb_i.size() > 0 && i_out_beat == qb_i.pop_front(), "ingress beat");
    end
  end

  always @(posedge clk) out_ready <= $urandom_range(0, 4) != 0;

  initial begin
    for (int c = 0; c < N; c++) begin
      rules[c].valid     = $urandom_range(0, 7) != 0;
      rules[c].mac       = {40'h02_00_00_00_00, 8'(c)};
      rules[c].vid       = (c % 4 == 0) ? 12'd0 : 12'(100 + c % 3);
      rules[c].ip        = {24'h0A0000, 8'(c)};
      rules[c].port      = 16'(5000 + c);
      rules[c].rmac_any  = $urandom_range(0, 1);
      rules[c].rmac      = {40'h02_00_00_00_00, 8'($urandom_range(0, N - 1))};
      rules[c].rip       = 32'h0A00_0000;
      rules[c].rip_mask  = $urandom_range(0, 3) == 0 ? 32'hFFFF_FFFF : 32'hFFFF_FF00;
      rules[c].rport_any = $urandom_range(0, 1);
      rules[c].rport     = 16'(5000 + $urandom_range(0, N - 1));
      rules[c].vnid      = 12'($urandom_range(1, 2));
    end
  end

  initial begin
    in_valid = 0; in_beat = '0; in_hdr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 3000; p++) begin
      hdr_t h;
      int n, k, d, s, t;
      s = $urandom_range(0, N + 1);
      t = $urandom_range(0, N - 1);
      h = '0;
      h.src_conn = 8'(s);
      if (s < N) begin
        h.src_mac = rules[s].mac; h.src_ip = rules[s].ip; h.src_port = rules[s].port;
        h.has_vlan = rules[s].vid != 0; h.vid = rules[s].vid;
      end
      h.dst_mac = rules[t].mac; h.dst_ip = rules[t].ip; h.dst_port = rules[t].port;
      if (!(s < N) || rules[t].vid != rules[s].vid) begin
        h.has_vlan = rules[t].vid != 0; h.vid = rules[t].vid;
      end
      if ($urandom_range(0, 3) == 0) h.dst_ip = 32'h0B00_0001;   // remote host
      case ($urandom_range(0, 9))
        0: h.src_mac[0] = ~h.src_mac[0];
        1: h.src_ip[3]  = ~h.src_ip[3];
        2: h.src_port   = h.src_port + 1;
        3: h.vid        = h.vid + 1;
        4: h.dst_port   = h.dst_port + 1;
        5: h.dst_mac[1] = ~h.dst_mac[1];
        default: ;
      endcase
      h.tag_ok   = $urandom_range(0, 7) != 0;
      h.tag_vnid = 12'($urandom_range(1, 2));
      n = $urandom_range(1, 20);
      k = $urandom_range(0, 9) == 0 ? 99 : $urandom_range(0, 12);
      d = k < n - 1 ? k : n - 1;
      if (d > 15) d = 15;
      qe.push_back(exp_egress(h, k <= d));
      qi.push_back(exp_ingress(h, k <= d));
      for (int b = 0; b < n; b++) begin
        beat_t bt;
        bt.data = {$urandom(), $urandom()};
        bt.keep = 8'hFF;
        bt.last = b == n - 1;
        in_hdr       <= h;
        in_hdr.v_mac <= b >= k;
        in_hdr.v_l4  <= b >= k;
        in_beat  <= bt;
        in_valid <= 1;
        qb_e.push_back(bt); qb_i.push_back(bt);
        @(posedge clk);
        while (!(e_in_ready && i_in_ready)) begin
          // hold until both instances take the beat in the same cycle
          in_valid <= 0;
          @(posedge clk);
          in_valid <= 1;
          @(posedge clk);
        end
      end
      in_valid <= 0;
      @(posedge clk);
    end
    repeat (20) @(posedge clk);
    check(qe.size() == 0 && qi.size() == 0, "every packet got a verdict");
    check(n_local > 0, "internal routing hit seen");
    for (int k = 0; k < 6; k++) check(reason_seen[k] > 0, $sformatf("reason %0d seen", k));
    check(n_ok_in > 0 && n_pass > 0, "passing packets seen");
    $display("local=%0d pass=%0d in_ok=%0d in_drop=%0d", n_local, n_pass, n_ok_in, n_drop_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
