// tb_rv32i_tmr_core: end-to-end test of the TMR single-cycle core at its
// default size (64 KiB instruction address space, 256-byte data memory, all
// four components triplicated).
//
// The test program (rv32i_test_pkg) is loaded through the load port while
// reset is held. Then, every cycle, the core's PC, voted instruction,
// register write-back and store are compared with an instruction-set
// reference model. During the run single-event upsets are injected into one
// replica of each triplicated component: an instruction-memory word inside
// the loop, a data-memory byte before it is loaded, register x5 before its
// many uses, and the PC. All must be outvoted, so the trace must stay
// identical to the reference. The test also checks one instruction per
// cycle (the halt arrives in the cycle the reference model predicts) and
// that ECALL holds the PC. It counts how often each mechanism occurred
// (branch taken / not taken, JAL, JALR, load, store, halt, a masked
// disagreement at each voter, PC repair) and fails any that never did.
module tb_rv32i_tmr_core;
  import rv_pkg::*;
  import rv32i_test_pkg::*;

  int checks = 0, failures = 0;

  logic        clk = 0, rst;
  logic        prog_we;
  logic [13:0] prog_addr;
  logic [31:0] prog_data;
  seu_req_t    seu;
  logic        halted;
  logic [31:0] pc, instr;
  logic [3:0]  mismatch;
  logic        wb_en, st_en;
  logic [4:0]  wb_rd;
  logic [31:0] wb_data, st_data;
  logic [7:0]  st_addr;
  logic [2:0]  st_funct3;

  rv32i_tmr_core dut (.clk, .rst, .prog_we, .prog_addr, .prog_data, .seu, .halted,
                      .pc, .instr, .mismatch, .wb_en, .wb_rd, .wb_data, .st_en,
                      .st_addr, .st_funct3, .st_data);

  always #5 clk = ~clk;

  // mechanism counters
  int n_br_taken, n_br_not, n_jal, n_jalr, n_load, n_store, n_halt;
  int n_mask [4];
  int n_pc_repair;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (pc=%h instr=%h)", what, pc, instr);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] prog [PROG_LEN];
    iss_state_t  s;
    iss_effect_t e;
    int          cycle, pc_upset_cycle;
    bit          done;

    n_br_taken = 0; n_br_not = 0; n_jal = 0; n_jalr = 0; n_load = 0; n_store = 0;
    n_halt = 0; n_pc_repair = 0;
    foreach (n_mask[i]) n_mask[i] = 0;

    rst = 1; prog_we = 0; prog_addr = 0; prog_data = 0; seu = '0;
    build_program(prog);
    for (int i = 0; i < PROG_LEN; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 14'(i); prog_data = prog[i];
    end
    @(negedge clk);
    prog_we = 0;
    @(negedge clk);
    rst = 0;
    #1;

    s.pc = 0; s.halted = 0;
    foreach (s.regs[i]) s.regs[i] = 0;
    foreach (s.mem[i]) s.mem[i] = 0;

    cycle = 0; done = 0; pc_upset_cycle = 25;
    while (!done) begin
      // upsets, each into a single replica, applied at the coming edge
      seu = '0;
      case (cycle)
        3:  seu = '{en: 1, target: SEU_IMEM, copy: 2, addr: 16'd18, bit_idx: 5'd20};
        5:  seu = '{en: 1, target: SEU_IMEM, copy: 0, addr: 16'd31, bit_idx: 5'd3};
        10: seu = '{en: 1, target: SEU_DMEM, copy: 1, addr: 16'd4, bit_idx: 5'd1};
        20: seu = '{en: 1, target: SEU_RF, copy: 0, addr: 16'd5, bit_idx: 5'd0};
        22: seu = '{en: 1, target: SEU_RF, copy: 2, addr: 16'd12, bit_idx: 5'd9};
        default: ;
      endcase
      if (cycle == pc_upset_cycle)
        seu = '{en: 1, target: SEU_PC, copy: 1, addr: 16'd0, bit_idx: 5'd2};

      // compare this cycle's activity with the reference model
      check(pc == s.pc, $sformatf("pc exp %h", s.pc));
      e = iss_step(s, prog);
      check(instr == e.instr, $sformatf("instr exp %h", e.instr));
      check(wb_en == e.wb_en, "write-back enable");
      if (e.wb_en)
        check(wb_rd == e.rd && wb_data == e.wb_data,
              $sformatf("write-back x%0d=%h exp x%0d=%h", wb_rd, wb_data, e.rd, e.wb_data));
      check(st_en == e.st_en, "store enable");
      if (e.st_en)
        check(st_addr == e.st_addr && st_data == e.st_data && st_funct3 == e.st_f3,
              $sformatf("store [%h]=%h exp [%h]=%h", st_addr, st_data, e.st_addr, e.st_data));
      check(halted == e.is_halt, "halt flag");

      if (e.is_branch && e.taken) n_br_taken++;
      if (e.is_branch && !e.taken) n_br_not++;
      if (e.is_jal) n_jal++;
      if (e.is_jalr) n_jalr++;
      if (e.is_load) n_load++;
      if (e.is_store) n_store++;
      foreach (mismatch[i]) if (mismatch[i]) n_mask[i]++;
      if (cycle == pc_upset_cycle + 1) check(mismatch[0], "PC replica disagreement visible");
      if (cycle == pc_upset_cycle + 2 && !mismatch[0]) n_pc_repair++;

      if (e.is_halt) begin
        n_halt++;
        // one instruction per cycle: the program executes 76 instructions
        // before its ECALL (17 straight-line, 10 loop passes of 3, 6 in the
        // branch chain, 18 arithmetic, 4 in the subroutine, 1 after return)
        check(cycle == 76, $sformatf("halt reached at cycle %0d, expected 76", cycle));
        done = 1;
      end
      @(negedge clk);
      #1;
      cycle++;
    end
    seu = '0;
    // halted core keeps its PC
    repeat (4) begin
      check(halted && pc == s.pc, "PC holds after ECALL");
      @(negedge clk);
    end

    $display("mechanisms: branch_taken=%0d branch_not_taken=%0d jal=%0d jalr=%0d load=%0d store=%0d halt=%0d",
             n_br_taken, n_br_not, n_jal, n_jalr, n_load, n_store, n_halt);
    $display("masked disagreements: pc=%0d rf=%0d imem=%0d dmem=%0d, pc_repair=%0d",
             n_mask[0], n_mask[1], n_mask[2], n_mask[3], n_pc_repair);
    check(n_br_taken > 0, "branch taken happened");
    check(n_br_not > 0, "branch not taken happened");
    check(n_jal > 0, "JAL happened");
    check(n_jalr > 0, "JALR happened");
    check(n_load > 0, "load happened");
    check(n_store > 0, "store happened");
    check(n_halt > 0, "halt happened");
    check(n_mask[0] > 0, "PC voter masked an upset");
    check(n_mask[1] > 0, "register file voter masked an upset");
    check(n_mask[2] > 0, "instruction memory voter masked an upset");
    check(n_mask[3] > 0, "data memory voter masked an upset");
    check(n_pc_repair > 0, "PC replica repaired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
