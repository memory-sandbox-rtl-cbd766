// Self-checking testbench of rand_addr_gen. Four instances with different
// design parameters see the same sequential input:
//   whole address + pseudo-channel range   bits [27:5] and [32:28] vary,
//                                          pseudo-channel stays in range;
//   bank only (RGBCG policy)               only bits [12:11] change;
//   column + row (RCB policy)              only [27:14] and [13:9] change;
//   disabled (sequential mode)             output equals input.
// Each check compares the output with the input outside the bits allowed to
// change, and counts that the allowed bits really take several values.
module tb_rand_addr_gen;
  import ms_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  cmd_t in_cmd;
  cmd_t o_whole, o_bank, o_cr, o_off;
  logic r_whole, r_bank, r_cr, r_off, en;
  logic v_whole, v_bank, v_cr, v_off;
  logic [4:0] pi, pe;

  rand_addr_gen #(.RAND_PSCH(1), .RAND_WHOLE_ADDR(1)) u_whole (.clk, .rst_n, .enable(en),
    .psch_init(pi), .psch_end(pe), .in_valid(1'b1), .in_ready(r_whole), .in_cmd,
    .out_valid(v_whole), .out_ready(1'b1), .out_cmd(o_whole));
  rand_addr_gen #(.POLICY(POL_HBM_RGBCG), .RAND_PSCH(0), .RAND_WHOLE_ADDR(0), .RAND_BANK(1))
    u_bank (.clk, .rst_n, .enable(en), .psch_init(pi), .psch_end(pe), .in_valid(1'b1),
    .in_ready(r_bank), .in_cmd, .out_valid(v_bank), .out_ready(1'b1), .out_cmd(o_bank));
  rand_addr_gen #(.POLICY(POL_HBM_RCB), .RAND_PSCH(0), .RAND_WHOLE_ADDR(0), .RAND_COL(1),
    .RAND_ROW(1)) u_cr (.clk, .rst_n, .enable(en), .psch_init(pi), .psch_end(pe),
    .in_valid(1'b1), .in_ready(r_cr), .in_cmd, .out_valid(v_cr), .out_ready(1'b1),
    .out_cmd(o_cr));
  rand_addr_gen #(.RAND_PSCH(1), .RAND_WHOLE_ADDR(1)) u_off (.clk, .rst_n, .enable(1'b0),
    .psch_init(pi), .psch_end(pe), .in_valid(1'b1), .in_ready(r_off), .in_cmd,
    .out_valid(v_off), .out_ready(1'b0), .out_cmd(o_off));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [ADDR_MAX-1:0] seen_bank, seen_whole, seen_cr;
    int psch_hist [32];
    int in_range, distinct;
    logic [ADDR_MAX-1:0] prev;
    en = 0; pi = 8; pe = 15;
    in_cmd = '0; in_cmd.len = 0; in_cmd.strb = '1;
    foreach (psch_hist[i]) psch_hist[i] = 0;
    seen_bank = '0; seen_whole = '0; seen_cr = '0; in_range = 1; distinct = 0; prev = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    in_cmd.addr = ADDR_MAX'({5'd9, 28'h0ABC_DE0});
    #1;
    check(o_whole.addr == in_cmd.addr, "disabled: address unchanged");
    en = 1;
    for (int i = 0; i < 400; i++) begin
      in_cmd.addr = ADDR_MAX'({5'd9, 28'(i * 32)});
      #1;
      // whole address: bits [4:0] zero, pseudo-channel inside [8,15]
      if (o_whole.addr[4:0] != 0) in_range = 0;
      if (o_whole.addr[32:28] < 8 || o_whole.addr[32:28] > 15) in_range = 0;
      psch_hist[o_whole.addr[32:28]]++;
      seen_whole |= o_whole.addr ^ in_cmd.addr;
      if (o_whole.addr != prev) distinct++;
      prev = o_whole.addr;
      // bank only
      check((o_bank.addr & ~policy_masks(POL_HBM_RGBCG).bank) ==
            (in_cmd.addr & ~policy_masks(POL_HBM_RGBCG).bank), "bank-only keeps other bits");
      seen_bank |= o_bank.addr ^ in_cmd.addr;
      // column and row
      check((o_cr.addr & ~(bits(27, 9))) == (in_cmd.addr & ~(bits(27, 9))),
            "row+column keeps bank and bank group");
      seen_cr |= o_cr.addr ^ in_cmd.addr;
      check(o_off.addr == in_cmd.addr && !r_off, "disabled instance passes commands through");
      check(v_whole && r_whole, "handshake passes through");
      @(negedge clk);
    end
    check(in_range == 1, "pseudo-channel within [PSCH_Addrr_Init, PSCH_Addrr_End]");
    for (int p = 8; p <= 15; p++) check(psch_hist[p] > 20, $sformatf("pseudo-channel %0d drawn", p));
    check(seen_whole[27:5] == '1, "every application address bit changes");
    check(seen_bank[12:11] == 2'b11 && seen_bank[10:0] == 0, "bank bits change");
    check(seen_cr[27:9] == '1, "row and column bits change");
    check(distinct > 390, "addresses differ from one burst to the next");
    // 16-beat bursts are aligned to 512 bytes
    in_cmd.len = 15;
    for (int i = 0; i < 50; i++) begin
      #1; check(o_whole.addr[8:0] == 0, "16-beat burst aligned to 512 bytes");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
