// Full-size testbench for shepherd_l3_cache: the cache with all parameters
// at their defaults (4 MB, 16 ways of 64 bytes, 4096 sets, 4 Shepherd ways,
// SC-XL over Clock, 50-bit addresses).  After the 4096-cycle clearing it
// runs 20000 requests over eight sets spread across the index range, with
// every response checked by tb_cache_checker against the reference model.
`timescale 1ns/1ps
module tb_shepherd_l3_cache_full;
  import repl_pkg::*;

  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  logic        req_valid, req_ready, resp_valid, resp_hit, resp_evict;
  logic [49:0] req_addr, resp_evict_addr;
  logic [3:0]  resp_way;
  decision_e   resp_decision;
  logic [31:0] access_cnt, miss_cnt;
  bit          done;
  int          checks, failures;

  shepherd_l3_cache dut (
    .clk, .rst_n,
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_addr_i(req_addr),
    .resp_valid_o(resp_valid), .resp_hit_o(resp_hit), .resp_way_o(resp_way),
    .resp_evict_o(resp_evict), .resp_evict_addr_o(resp_evict_addr),
    .resp_decision_o(resp_decision),
    .access_cnt_o(access_cnt), .miss_cnt_o(miss_cnt));

  tb_cache_checker #(.HOT_SETS(8), .N_REQ(20000)) chk_i (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_addr,
    .resp_valid, .resp_hit, .resp_way, .resp_evict, .resp_evict_addr, .resp_decision,
    .access_cnt, .miss_cnt,
    .done, .checks, .failures);

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
