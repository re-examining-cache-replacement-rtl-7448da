// End-to-end testbench for shepherd_l3_cache.
// Six caches run side by side, one for every combination of Shepherd
// variant (SC-XL, SC-L) and baseline policy (LRU, pseudo-LRU, Clock), each
// reduced to 16 sets (16 KB) so that a few thousand requests exercise every
// replacement path many times.  Each cache has its own tb_cache_checker,
// which drives requests and compares every response with a reference model.
`timescale 1ns/1ps
module tb_shepherd_l3_cache;
  import repl_pkg::*;

  localparam int unsigned BYTES = 16 * 16 * 64;
  localparam int unsigned NREQ  = 6000;
  localparam int NCFG = 6;

  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  bit done[NCFG];
  int chk[NCFG], fl[NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam sc_mode_e M = (g < 3) ? SC_XL : SC_L;
    localparam base_e    B = (g % 3 == 0) ? BASE_CLOCK : (g % 3 == 1) ? BASE_LRU : BASE_PLRU;
    logic        req_valid, req_ready, resp_valid, resp_hit, resp_evict;
    logic [49:0] req_addr, resp_evict_addr;
    logic [3:0]  resp_way;
    decision_e   resp_decision;
    logic [31:0] access_cnt, miss_cnt;

    shepherd_l3_cache #(.CACHE_BYTES(BYTES), .SC_MODE(M), .BASE(B)) dut (
      .clk, .rst_n,
      .req_valid_i(req_valid), .req_ready_o(req_ready), .req_addr_i(req_addr),
      .resp_valid_o(resp_valid), .resp_hit_o(resp_hit), .resp_way_o(resp_way),
      .resp_evict_o(resp_evict), .resp_evict_addr_o(resp_evict_addr),
      .resp_decision_o(resp_decision),
      .access_cnt_o(access_cnt), .miss_cnt_o(miss_cnt));

    tb_cache_checker #(.SC_MODE(M), .BASE(B), .CACHE_BYTES(BYTES),
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
