// Cache-size testbench for shepherd_l3_cache.
// The policy combinations of the proposed designs (SC-L over LRU, SC-XL over
// LRU, SC-L over pseudo-LRU, SC-XL over Clock), each built at the four
// shared-cache capacities of the evaluation: 4, 8, 16 and 32 MB, 16 ways of
// 64 bytes (4096 to 32768 sets).  Every instance is cleared after reset and
// then runs 3000 requests over four sets (the first, the last and two in
// between), each response checked by tb_cache_checker against the
// reference model.  Synthetic traffic stands in for the commercial traces.
`timescale 1ns/1ps
module tb_shepherd_l3_cache_sizes;
  import repl_pkg::*;

  localparam int NCFG = 16;
  localparam int unsigned NREQ = 3000;

  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  bit done[NCFG];
  int chk[NCFG], fl[NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int unsigned MB = 4 << (g % 4);
    localparam int          C  = g / 4;
    localparam sc_mode_e M = (C == 0 || C == 2) ? SC_L : SC_XL;
    localparam base_e    B = (C == 3) ? BASE_CLOCK : (C == 2) ? BASE_PLRU : BASE_LRU;
    logic        req_valid, req_ready, resp_valid, resp_hit, resp_evict;
    logic [49:0] req_addr, resp_evict_addr;
    logic [3:0]  resp_way;
    decision_e   resp_decision;
    logic [31:0] access_cnt, miss_cnt;

    shepherd_l3_cache #(.CACHE_BYTES(MB * 1024 * 1024), .SC_MODE(M), .BASE(B)) dut (
      .clk, .rst_n,
      .req_valid_i(req_valid), .req_ready_o(req_ready), .req_addr_i(req_addr),
      .resp_valid_o(resp_valid), .resp_hit_o(resp_hit), .resp_way_o(resp_way),
      .resp_evict_o(resp_evict), .resp_evict_addr_o(resp_evict_addr),
      .resp_decision_o(resp_decision),
      .access_cnt_o(access_cnt), .miss_cnt_o(miss_cnt));

    tb_cache_checker #(.SC_MODE(M), .BASE(B), .CACHE_BYTES(MB * 1024 * 1024),
                       .HOT_SETS(4), .N_REQ(NREQ)) chk_i (
      .clk, .rst_n,
      .req_valid, .req_ready, .req_addr,
      .resp_valid, .resp_hit, .resp_way, .resp_evict, .resp_evict_addr, .resp_decision,
      .access_cnt, .miss_cnt,
      .done(done[g]), .checks(chk[g]), .failures(fl[g]));
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk.sum(), fl.sum() + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done.and());
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", chk.sum(), fl.sum());
    $finish;
  end
endmodule
