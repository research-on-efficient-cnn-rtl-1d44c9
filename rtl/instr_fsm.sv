// instr_fsm: instruction store and sequencer of the accelerator.
//
// The way each layer is computed is compiled ahead of time into a list of
// instructions (one per pass of a PE over a layer: layer, first output
// channel, PE, weight block, result RAM, stride; see mp_pkg::instr_t). The
// list is held in a small ROM that is written at start-up from the package's
// program. After start the FSM hands out the instructions in order: it
// presents one on instr with instr_valid for a cycle, waits for the layer
// controller's instr_done, then moves to the next. all_done pulses after the
// last one; busy is high in between. pc is the index of the current one.
module instr_fsm #(
  parameter int unsigned NUM_INSTR = mp_pkg::program_len(),
  localparam int unsigned PC_W     = $clog2(NUM_INSTR + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output mp_pkg::instr_t  instr,
  output logic            instr_valid,
  input  logic            instr_done,
  output logic            busy,
  output logic            all_done,
  output logic [PC_W-1:0] pc
);
  import mp_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_t;
  state_t state;
  instr_t prog [NUM_INSTR];

  initial begin
    for (int n = 0; n < int'(NUM_INSTR); n++) prog[n] = program_instr(n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      pc          <= '0;
      instr       <= '0;
      instr_valid <= 1'b0;
      all_done    <= 1'b0;
    end else begin
      instr_valid <= 1'b0;
      all_done    <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          pc    <= '0;
          state <= S_ISSUE;
        end
        S_ISSUE: begin
          instr       <= prog[pc];
          instr_valid <= 1'b1;
          state       <= S_WAIT;
        end
        S_WAIT: if (instr_done) begin
          if (32'(pc) == NUM_INSTR - 1) begin
            all_done <= 1'b1;
            state    <= S_IDLE;
          end else begin
            pc    <= pc + 1'b1;
            state <= S_ISSUE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
