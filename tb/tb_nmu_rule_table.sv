// tb_nmu_rule_table: self-checking test of the per-connection rule registers.
//
// Writes random words to random connections and registers (including
// out-of-range connections, which must be ignored), keeps its own copy of
// every rule built from the documented word map, and compares both the
// parallel rule outputs and the read-back port with that copy.
module tb_nmu_rule_table;
  import nmu_pkg::*;

  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cfg_we;
  logic [7:0]  cfg_conn;
  logic [3:0]  cfg_addr;
  logic [31:0] cfg_wdata, cfg_rdata;
  rule_t       rules [N];
  logic [31:0] words [N][9];
  int checks = 0, failures = 0;

  nmu_rule_table #(.N_CONN(N)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic rule_t expect_rule(int c);
    rule_t r;
    r.valid     = words[c][0][0];
    r.rmac_any  = words[c][0][1];
    r.rport_any = words[c][0][2];
    r.mac       = {words[c][2][15:0], words[c][1]};
    r.vid       = words[c][2][27:16];
    r.ip        = words[c][3];
    r.port      = words[c][4][15:0];
    r.vnid      = words[c][4][27:16];
    r.rmac      = {words[c][6][15:0], words[c][5]};
    r.rport     = words[c][6][31:16];
    r.rip       = words[c][7];
    r.rip_mask  = words[c][8];
    return r;
  endfunction

  function automatic logic [31:0] expect_word(int c, int a);
    logic [31:0] w;
    w = words[c][a];
    case (a)
      0: w = {29'd0, w[2:0]};
      2, 4: w = {4'd0, w[27:0]};
      default: ;
    endcase
    return w;
  endfunction

  initial begin
    cfg_we = 0; cfg_conn = 0; cfg_addr = 0; cfg_wdata = 0;
    foreach (words[c, a]) words[c][a] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int c = 0; c < N; c++) check(rules[c] == '0, "reset clears");
    for (int i = 0; i < 2000; i++) begin
      int c, a;
      c = $urandom_range(0, N + 3);
      a = $urandom_range(0, 9);
      cfg_we <= 1; cfg_conn <= 8'(c); cfg_addr <= 4'(a); cfg_wdata <= $urandom();
      @(posedge clk);
      if (c < N && a < 9) words[c][a] = cfg_wdata;
      cfg_we <= 0;
      @(posedge clk);
      c = $urandom_range(0, N - 1);
      check(rules[c] == expect_rule(c), $sformatf("rule %0d", c));
      a = $urandom_range(0, 8);
      cfg_conn <= 8'(c); cfg_addr <= 4'(a);
      @(posedge clk);
      #1 check(cfg_rdata == expect_word(c, a), $sformatf("readback %0d/%0d", c, a));
    end
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
