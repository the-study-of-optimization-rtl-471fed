// tb_rpimc_regbank -- self-checking test of the register bank: every control
// register is written with random data and read back (masked to its width),
// the `cfg` fields must follow, status registers must show the controller's
// inputs and ignore writes, and reset must clear the control registers.
`timescale 1ns/1ps
module tb_rpimc_regbank;
  import rpimc_pkg::*;

  logic         clk = 0, rst_n = 0, wr_en = 0;
  logic [3:0]   addr = 0;
  logic [31:0]  wdata = 0, rdata;
  rpimc_cfg_t   cfg;
  rpimc_state_t st_state = ST_SLEEP;
  logic         st_reject = 1'b1, st_inter = 1'b1;
  logic [31:0]  st_osize = 32'h1234_5678;
  int           checks = 0, failures = 0;
  logic [31:0]  wrote [11];
  logic [31:0]  mask  [11] = '{32'hffff, 32'hffff, '1, 32'hff, '1, '1, '1, '1, 32'hff, '1, 32'h1};

  always #5 clk = ~clk;

  rpimc_regbank dut (.*);

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL: %s got %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 11; a++) begin addr = 4'(a); #1; chk(rdata, 0, "reset value"); end
    for (int a = 0; a < 11; a++) begin
      wrote[a] = $urandom;
      @(negedge clk); wr_en = 1; addr = 4'(a); wdata = wrote[a];
    end
    @(negedge clk); wr_en = 0;
    for (int a = 0; a < 11; a++) begin addr = 4'(a); #1; chk(rdata, wrote[a] & mask[a], $sformatf("CR %0d", a)); end
    chk(32'(cfg.w), wrote[0] & 32'hffff, "cfg.w");
    chk(cfg.mem1, wrote[6], "cfg.mem1");
    chk(cfg.out, wrote[9], "cfg.out");
    chk(32'(cfg.enable), wrote[10] & 1, "cfg.enable");
    addr = REG_STATUS; #1; chk(rdata, 32'h6, "status");
    addr = REG_OSIZE;  #1; chk(rdata, 32'h1234_5678, "osize");
    addr = REG_MODE;   #1; chk(rdata, 32'h1, "mode");
    @(negedge clk); wr_en = 1; addr = REG_OSIZE; wdata = 0;
    @(negedge clk); wr_en = 0; #1; chk(rdata, 32'h1234_5678, "osize read-only");
    rst_n = 0; #1; rst_n = 1;
    addr = REG_MEM2; #1; chk(rdata, 0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
