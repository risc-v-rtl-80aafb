// tmr_config_runner: testbench helper that runs the test program on one
// configuration of the core (which of the four storage components are
// triplicated) four times, each time with a single upset in a different
// component, and compares the retirement trace with the reference model.
//
// An upset in a triplicated component must leave the trace identical to the
// reference (masked); an upset in a single-copy component must change it
// (exposed). `n_ok` counts runs that behaved as expected, `n_bad` runs that
// did not; `n_masked` and `n_exposed` split the expected outcomes. Between
// runs the core is reset and the program reloaded, which also overwrites any
// corrupted instruction word.
module tmr_config_runner
  import rv_pkg::*;
  import rv32i_test_pkg::*;
#(
  parameter bit TMR_PC   = 1'b1,
  parameter bit TMR_RF   = 1'b1,
  parameter bit TMR_IMEM = 1'b1,
  parameter bit TMR_DMEM = 1'b1
) (
  input  logic clk,
  output logic done,
  output int   n_ok,
  output int   n_bad,
  output int   n_masked,
  output int   n_exposed
);
  logic        rst, prog_we, halted, wb_en, st_en;
  logic [13:0] prog_addr;
  logic [31:0] prog_data, pc, instr, wb_data, st_data;
  seu_req_t    seu;
  logic [3:0]  mismatch;
  logic [4:0]  wb_rd;
  logic [7:0]  st_addr;
  logic [2:0]  st_funct3;

  rv32i_tmr_core #(.TMR_PC(TMR_PC), .TMR_RF(TMR_RF), .TMR_IMEM(TMR_IMEM), .TMR_DMEM(TMR_DMEM)) u_core (
    .clk, .rst, .prog_we, .prog_addr, .prog_data, .seu, .halted, .pc, .instr, .mismatch,
    .wb_en, .wb_rd, .wb_data, .st_en, .st_addr, .st_funct3, .st_data);

  localparam bit PROT [4] = '{TMR_PC, TMR_RF, TMR_IMEM, TMR_DMEM};

  initial begin
    logic [31:0] prog [PROG_LEN];
    seu_req_t    upsets [4];
    int          when [4];
    upsets[0] = '{en: 1, target: SEU_PC,   copy: 1, addr: 16'd0,  bit_idx: 5'd2};  when[0] = 25;
    upsets[1] = '{en: 1, target: SEU_RF,   copy: 0, addr: 16'd5,  bit_idx: 5'd0};  when[1] = 20;
    upsets[2] = '{en: 1, target: SEU_IMEM, copy: 2, addr: 16'd18, bit_idx: 5'd20}; when[2] = 3;
    upsets[3] = '{en: 1, target: SEU_DMEM, copy: 1, addr: 16'd4,  bit_idx: 5'd1};  when[3] = 10;
    done = 0; n_ok = 0; n_bad = 0; n_masked = 0; n_exposed = 0;
    rst = 1; prog_we = 0; prog_addr = 0; prog_data = 0; seu = '0;
    build_program(prog);
    for (int t = 0; t < 4; t++) begin
      iss_state_t  s;
      iss_effect_t e;
      bit          diverged, stop;
      int          cycle;
      rst = 1;
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
      diverged = 0; stop = 0; cycle = 0;
      while (!stop) begin
        seu = (cycle == when[t]) ? upsets[t] : '0;
        if (!diverged) begin
          bit same;
          same = (pc == s.pc);
          e = iss_step(s, prog);
          same &= (instr == e.instr) && (wb_en == e.wb_en) && (st_en == e.st_en);
          if (e.wb_en) same &= (wb_rd == e.rd) && (wb_data == e.wb_data);
          if (e.st_en) same &= (st_addr == e.st_addr) && (st_data == e.st_data);
          if (!same) diverged = 1;
          if (e.is_halt && same) stop = 1;
        end
        if (diverged && (halted || cycle > 200)) stop = 1;
        @(negedge clk);
        #1;
        cycle++;
      end
      seu = '0;
      if (PROT[t] && !diverged)      begin n_ok++; n_masked++; end
      else if (!PROT[t] && diverged) begin n_ok++; n_exposed++; end
      else begin
        n_bad++;
        $display("config pc=%0d rf=%0d imem=%0d dmem=%0d: upset in component %0d %s",
                 TMR_PC, TMR_RF, TMR_IMEM, TMR_DMEM, t,
                 PROT[t] ? "was not masked" : "left no trace");
      end
    end
    done = 1;
  end
endmodule
