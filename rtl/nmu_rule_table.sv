// nmu_rule_table: per-connection rule registers, written by the host.
//
// Holds one rule_t for each of N_CONN logical connections. The host (over
// PCIe in the deployment the document evaluates) writes 32-bit words; every
// rule is visible in parallel to the ACL checks and the CAMs. Word map
// (cfg_addr):
//   0  [0] valid  [1] rmac_any  [2] rport_any
//   1  own MAC [31:0]           2  [15:0] own MAC [47:32]  [27:16] VLAN id
//   3  own IPv4 address         4  [15:0] own port         [27:16] VNID
//   5  remote MAC [31:0]        6  [15:0] remote MAC [47:32] [31:16] remote port
//   7  remote IPv4 network      8  remote IPv4 mask
// A write takes effect at the next clock edge; cfg_rdata returns the word at
// cfg_conn/cfg_addr combinationally. Reset clears every rule (all invalid).
// Per-connection configuration from the host is the document's; the register
// map is this design's.
module nmu_rule_table
  import nmu_pkg::*;
#(
  parameter int unsigned N_CONN = N_CONN_DEFAULT
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [7:0]  cfg_conn,
  input  logic [3:0]  cfg_addr,
  input  logic [31:0] cfg_wdata,
  output logic [31:0] cfg_rdata,
  output rule_t       rules [N_CONN]
);
  localparam int unsigned CW = N_CONN > 1 ? $clog2(N_CONN) : 1;

  logic  in_range;
  rule_t r;

  assign in_range = 32'(cfg_conn) < N_CONN;
  assign r        = in_range ? rules[cfg_conn[CW-1:0]] : '0;

  always_comb begin
    unique case (cfg_addr)
      4'd0: cfg_rdata = {29'd0, r.rport_any, r.rmac_any, r.valid};
      4'd1: cfg_rdata = r.mac[31:0];
      4'd2: cfg_rdata = {4'd0, r.vid, r.mac[47:32]};
      4'd3: cfg_rdata = r.ip;
      4'd4: cfg_rdata = {4'd0, r.vnid, r.port};
      4'd5: cfg_rdata = r.rmac[31:0];
      4'd6: cfg_rdata = {r.rport, r.rmac[47:32]};
      4'd7: cfg_rdata = r.rip;
      4'd8: cfg_rdata = r.rip_mask;
      default: cfg_rdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned c = 0; c < N_CONN; c++) rules[c] <= '0;
    end else if (cfg_we && in_range) begin
      case (cfg_addr)
        4'd0: begin
          rules[cfg_conn[CW-1:0]].valid     <= cfg_wdata[0];
          rules[cfg_conn[CW-1:0]].rmac_any  <= cfg_wdata[1];
          rules[cfg_conn[CW-1:0]].rport_any <= cfg_wdata[2];
        end
        4'd1: rules[cfg_conn[CW-1:0]].mac[31:0]  <= cfg_wdata;
        4'd2: begin
          rules[cfg_conn[CW-1:0]].mac[47:32] <= cfg_wdata[15:0];
          rules[cfg_conn[CW-1:0]].vid        <= cfg_wdata[27:16];
        end
        4'd3: rules[cfg_conn[CW-1:0]].ip <= cfg_wdata;
        4'd4: begin
          rules[cfg_conn[CW-1:0]].port <= cfg_wdata[15:0];
          rules[cfg_conn[CW-1:0]].vnid <= cfg_wdata[27:16];
        end
        4'd5: rules[cfg_conn[CW-1:0]].rmac[31:0] <= cfg_wdata;
        4'd6: begin
          rules[cfg_conn[CW-1:0]].rmac[47:32] <= cfg_wdata[15:0];
          rules[cfg_conn[CW-1:0]].rport       <= cfg_wdata[31:16];
        end
        4'd7: rules[cfg_conn[CW-1:0]].rip      <= cfg_wdata;
        4'd8: rules[cfg_conn[CW-1:0]].rip_mask <= cfg_wdata;
        default: ;
      endcase
    end
  end
endmodule
