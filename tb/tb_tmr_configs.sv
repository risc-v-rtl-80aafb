// tb_tmr_configs: runs the six configurations of the core that are compared
// for cost: no voters, a voter on only the PC, only the instruction memory,
// only the register file, only the data memory, and all four. Each
// configuration executes the test program four times with one upset in a
// different storage component. Every upset in a triplicated component must
// be masked and every upset in an unprotected one must corrupt execution,
// so the full configuration masks all four and the baseline none.
module tb_tmr_configs;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic done [6];
  int   n_ok [6], n_bad [6], n_masked [6], n_exposed [6];

  tmr_config_runner #(.TMR_PC(0), .TMR_RF(0), .TMR_IMEM(0), .TMR_DMEM(0)) r_none (
    .clk, .done(done[0]), .n_ok(n_ok[0]), .n_bad(n_bad[0]), .n_masked(n_masked[0]), .n_exposed(n_exposed[0]));
  tmr_config_runner #(.TMR_PC(1), .TMR_RF(0), .TMR_IMEM(0), .TMR_DMEM(0)) r_pc (
    .clk, .done(done[1]), .n_ok(n_ok[1]), .n_bad(n_bad[1]), .n_masked(n_masked[1]), .n_exposed(n_exposed[1]));
  tmr_config_runner #(.TMR_PC(0), .TMR_RF(0), .TMR_IMEM(1), .TMR_DMEM(0)) r_imem (
    .clk, .done(done[2]), .n_ok(n_ok[2]), .n_bad(n_bad[2]), .n_masked(n_masked[2]), .n_exposed(n_exposed[2]));
  tmr_config_runner #(.TMR_PC(0), .TMR_RF(1), .TMR_IMEM(0), .TMR_DMEM(0)) r_rf (
    .clk, .done(done[3]), .n_ok(n_ok[3]), .n_bad(n_bad[3]), .n_masked(n_masked[3]), .n_exposed(n_exposed[3]));
  tmr_config_runner #(.TMR_PC(0), .TMR_RF(0), .TMR_IMEM(0), .TMR_DMEM(1)) r_dmem (
    .clk, .done(done[4]), .n_ok(n_ok[4]), .n_bad(n_bad[4]), .n_masked(n_masked[4]), .n_exposed(n_exposed[4]));
  tmr_config_runner #(.TMR_PC(1), .TMR_RF(1), .TMR_IMEM(1), .TMR_DMEM(1)) r_all (
    .clk, .done(done[5]), .n_ok(n_ok[5]), .n_bad(n_bad[5]), .n_masked(n_masked[5]), .n_exposed(n_exposed[5]));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string names [6];
    int exp_masked [6];
    int tot_masked, tot_exposed;
    names = '{"no voters", "PC voter", "instruction memory voter", "register file voter",
              "data memory voter", "all voters"};
    exp_masked = '{0, 1, 1, 1, 1, 4};
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5]);
    tot_masked = 0; tot_exposed = 0;
    foreach (names[i]) begin
      $display("%-26s: %0d of 4 upsets masked, %0d exposed, %0d unexpected",
               names[i], n_masked[i], n_exposed[i], n_bad[i]);
      checks++;
      if (n_ok[i] != 4 || n_bad[i] != 0) failures++;
      checks++;
      if (n_masked[i] != exp_masked[i]) failures++;
      tot_masked += n_masked[i]; tot_exposed += n_exposed[i];
    end
    // both outcomes must have occurred
    checks++; if (tot_masked == 0) failures++;
    checks++; if (tot_exposed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
