// Self-checking testbench of seq_addr_gen: a short traversal with random
// back-pressure, checked address by address against base + k * burst bytes,
// then a long one that must wrap to the start of the pseudo-channel after
// 256 MB, and a DDR4 instance with 64-byte beats.
module tb_seq_addr_gen;
  import ms_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic start, ready, valid, done;
  logic [LEN_MAX-1:0] len;
  logic [NUM_TRANS_W-1:0] n;
  logic [4:0] psch;
  cmd_t cmd;
  seq_addr_gen #(.IS_DDR(1'b0)) dut (.clk, .rst_n, .start, .len, .num_trans(n), .psch,
    .cmd_valid(valid), .cmd_ready(ready), .cmd, .done);

  logic d_start, d_valid, d_done;
  cmd_t d_cmd;
  seq_addr_gen #(.IS_DDR(1'b1)) dut_ddr (.clk, .rst_n, .start(d_start), .len(8'd255),
    .num_trans(33'd3), .psch(5'd0), .cmd_valid(d_valid), .cmd_ready(1'b1), .cmd(d_cmd),
    .done(d_done));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    start = 0; ready = 0; len = 3; n = 5; psch = 7; d_start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    check(valid && !done, "valid after start");
    k = 0;
    while (k < 5) begin
      ready = ($urandom_range(1) == 1);
      #1;
      if (valid && ready) begin
        check(cmd.addr == ADDR_MAX'({5'd7, 28'(k * 128)}), $sformatf("address of burst %0d", k));
        check(cmd.len == 8'd3, "length");
        check(cmd.strb == '1, "strobes");
        k++;
      end
      @(negedge clk);
    end
    ready = 0;
    check(done && !valid, "done after Num_trans bursts");
    // wrap: 2^19 bursts of 512 bytes fill 256 MB
    len = 15; n = 33'(1 << 19) + 2; psch = 3; ready = 1;
    start = 1; @(negedge clk); start = 0;
    repeat (1 << 19) @(negedge clk);
    check(cmd.addr == ADDR_MAX'({5'd3, 28'd0}), "wraps to the start of the pseudo-channel");
    @(negedge clk);
    check(cmd.addr == ADDR_MAX'({5'd3, 28'd512}), "continues after the wrap");
    @(negedge clk); @(negedge clk);
    check(done, "done after the long run");
    // DDR4: 256 beats of 64 bytes = 16 KB per burst, no pseudo-channel bits
    d_start = 1; @(negedge clk); d_start = 0;
    check(d_valid && d_cmd.addr == '0, "DDR first burst");
    @(negedge clk);
    check(d_cmd.addr == ADDR_MAX'(16384), "DDR second burst at 16 KB");
    @(negedge clk);
    check(d_cmd.addr == ADDR_MAX'(32768) && d_cmd.len == 8'd255, "DDR third burst");
    @(negedge clk);
    check(d_done, "DDR done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
