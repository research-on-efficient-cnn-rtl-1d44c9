// tb_instr_fsm: runs the full program (default length) through the
// instruction FSM with a random number of busy cycles per instruction, and
// compares every issued 26-bit instruction and its pc with the program
// function. Checks that each instruction is offered for exactly one handshake,
// that busy holds until all_done, and that a second start replays the program.
// Rate: with an immediate instr_done the FSM must spend a bounded number of
// cycles per instruction (at most 3).
module tb_instr_fsm;
  import mp_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, instr_done = 0;
  always #5 clk = ~clk;
  instr_t instr;
  logic instr_valid, busy, all_done;
  localparam int unsigned N = program_len();
  logic [$clog2(N+1)-1:0] pc;
  int checks = 0, failures = 0;

  instr_fsm dut (.clk, .rst_n, .start, .instr, .instr_valid, .instr_done, .busy, .all_done, .pc);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit fast, output int cycles);
    automatic int n = 0;
    automatic int c = 0;
    start = 1; @(negedge clk); start = 0;
    while (!all_done) begin
      c++;
      if (instr_valid) begin
        checks++;
        if (instr != program_instr(n) || int'(pc) != n) begin
          failures++;
          if (failures < 10) $display("FAIL instr %0d: got %h exp %h pc %0d", n, instr, program_instr(n), pc);
        end
        if (!fast) repeat ($urandom % 5) begin
          @(negedge clk); c++;
          checks++;
          if (!busy) begin failures++; $display("FAIL busy dropped"); end
        end
        instr_done = 1; @(negedge clk); instr_done = 0;
        n++;
      end else @(negedge clk);
      if (c > 100000) break;
    end
    checks++;
    if (n != int'(N)) begin failures++; $display("FAIL issued %0d of %0d", n, N); end
    cycles = c;
  endtask

  initial begin
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(0, cyc);
    repeat (3) @(negedge clk);
    run(1, cyc);
    checks++;
    if (cyc > 3 * int'(N)) begin failures++; $display("FAIL %0d cycles for %0d instructions", cyc, N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
