// Self-checking testbench for set_ram (64 words of 40 bits).
// Random reads and writes are compared with a model array; read data must
// appear exactly one clock edge after the read, a simultaneous write to the
// same word must not show through, and the output must hold when no read is
// issued.
`timescale 1ns/1ps
module tb_set_ram;
  localparam int D = 64;
  localparam int WD = 40;

  logic          clk = 0;
  logic          re, we;
  logic [5:0]    raddr, waddr;
  logic [WD-1:0] rdata, wdata;
  logic [WD-1:0] model [D];
  logic [WD-1:0] exp_q;
  bit            pend;
  int checks, failures;

  set_ram #(.DEPTH(D), .WIDTH(WD)) dut (
    .clk, .re_i(re), .raddr_i(raddr), .rdata_o(rdata),
    .we_i(we), .waddr_i(waddr), .wdata_i(wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks = 0; failures = 0; pend = 0;
    re = 0; we = 0; raddr = 0; waddr = 0; wdata = 0;
    // fill every word
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1; waddr = 6'(a); wdata = {8'(a), 32'($urandom)};
      model[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rdata !== exp_q) begin
          failures++;
          if (failures < 10) $display("FAIL read %h expected %h", rdata, exp_q);
        end
      end
      re    = $urandom % 3 != 0;
      we    = $urandom % 2;
      raddr = 6'($urandom);
      waddr = ($urandom % 4 == 0) ? raddr : 6'($urandom);
      wdata = {8'(waddr), 32'($urandom)};
      if (re) begin
        exp_q = model[raddr];   // old data on a same-cycle write
        pend  = 1;
      end
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
