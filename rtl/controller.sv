// controller: six-clock execution-cycle sequencer of the thinning processor.
//
// One execution cycle handles one column k of one centre line and takes six
// clocks (phase_e):
//   1 PH_LOAD_L : l <= m[0]; RAM bank fetches column k; main memory fetch
//   2 PH_LOAD_M : m <= fetched column; main memory fetch (second clock)
//   3 PH_RAM_LD : RAM bank loads column k (RAM1<=RAM2<=RAM3<=main memory)
//   4 PH_STORE  : RAM bank fetches column k+1; store previous result
//   5 PH_LOAD_R : r <= bit 7 of column k+1; store (second clock)
//   6 PH_EXECUTE: modification unit array result -> temporal register
// The main memory fetch reads the line two below the centre line, and the
// store writes the column finished in the previous execution cycle, so the
// single memory address bus is never asked for two things at once. This
// schedule follows the published architecture.
//
// The run control is this design's own: on start, two priming lines load
// image lines 0 and 1 into the RAM bank without executing. Then passes of
// LINES x COLS execution cycles follow, Step = 1 for the first pass and
// toggling after each. Because the fetch pointer stays two lines ahead and
// wraps, the last two lines of a pass fetch lines 0 and 1 for the next
// pass, so only the first pass is primed. After every Step = 0 pass the
// continue flag (or a deletion in the final execute step) decides whether
// another iteration starts; if not, one flush cycle stores the last column
// and done pulses in its final clock. busy is high from the clock after
// start until done. Cycle count of a run with P passes:
//   6 * COLS * (2 + P * LINES) + 6 clocks of busy.
module controller
  import thinning_pkg::*;
#(
  parameter int unsigned COLS  = 64,
  parameter int unsigned LINES = 512,
  localparam int unsigned CW   = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int unsigned LW   = $clog2(LINES)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic cont,
  input  logic any_deleted,
  input  logic tmp_valid,
  output ctl_t ctl,
  output logic busy,
  output logic done
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FLUSH} state_e;

  state_e          state_q;
  phase_e          phase_q;
  logic [CW-1:0]   col_q;
  logic [LW-1:0]   line_q;
  logic            prime_q;   // priming lines in progress
  logic            step_q;
  logic            last_col, last_line, end_of_line, end_of_pass, iterate;

  assign last_col    = (col_q == CW'(COLS - 1));
  assign last_line   = prime_q ? (line_q == LW'(1)) : (line_q == LW'(LINES - 1));
  assign end_of_line = (phase_q == PH_EXECUTE) && last_col;
  assign end_of_pass = end_of_line && last_line && !prime_q;
  // Another iteration is needed if anything was deleted in this one.
  assign iterate     = cont || any_deleted;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      phase_q <= PH_LOAD_L;
      col_q   <= '0;
      line_q  <= '0;
      prime_q <= 1'b0;
      step_q  <= 1'b1;
    end else begin
      case (state_q)
        S_IDLE: begin
          if (start) begin
            state_q <= S_RUN;
            phase_q <= PH_LOAD_L;
            col_q   <= '0;
            line_q  <= '0;
            prime_q <= 1'b1;
            step_q  <= 1'b1;
          end
        end
        S_RUN: begin
          phase_q <= (phase_q == PH_EXECUTE) ? PH_LOAD_L : phase_e'(phase_q + 3'd1);
          if (phase_q == PH_EXECUTE) begin
            col_q <= last_col ? '0 : col_q + 1'b1;
            if (end_of_line) begin
              if (last_line) begin
                line_q  <= '0;
                prime_q <= 1'b0;
              end else begin
                line_q  <= line_q + 1'b1;
              end
            end
            if (end_of_pass) begin
              if (step_q) begin
                step_q <= 1'b0;
              end else if (iterate) begin
                step_q <= 1'b1;
              end else begin
                state_q <= S_FLUSH;
              end
            end
          end
        end
        S_FLUSH: begin
          phase_q <= (phase_q == PH_EXECUTE) ? PH_LOAD_L : phase_e'(phase_q + 3'd1);
          if (phase_q == PH_EXECUTE) state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    logic run, store_slot;
    run        = (state_q == S_RUN);
    store_slot = (state_q != S_IDLE) && tmp_valid &&
                 (phase_q == PH_STORE || phase_q == PH_LOAD_R);
    ctl = '0;
    ctl.init         = (state_q == S_IDLE) && start;
    ctl.lr_load      = run && (phase_q == PH_LOAD_L);
    ctl.mr_load      = run && (phase_q == PH_LOAD_M);
    ctl.rr_load      = run && (phase_q == PH_LOAD_R);
    ctl.ram_read     = run && (phase_q == PH_LOAD_L || phase_q == PH_STORE);
    ctl.ram_write    = run && (phase_q == PH_RAM_LD);
    ctl.ram_addr_inc = run && (phase_q == PH_RAM_LD);
    ctl.mem_read     = run && (phase_q == PH_LOAD_L || phase_q == PH_LOAD_M);
    ctl.fetch_inc    = run && (phase_q == PH_LOAD_M);
    ctl.mem_write    = store_slot;
    ctl.sel_store    = (state_q != S_IDLE) && (phase_q == PH_STORE || phase_q == PH_LOAD_R);
    ctl.store_inc    = store_slot && (phase_q == PH_LOAD_R);
    ctl.tmp_load     = run && (phase_q == PH_EXECUTE);
    ctl.exec_valid   = !prime_q;
    ctl.cont_clear   = ((state_q == S_IDLE) && start) ||
                       (end_of_pass && !step_q && run);
    ctl.step         = step_q;
    ctl.first_col    = (col_q == '0);
    ctl.last_col     = last_col;
    ctl.top_line     = !prime_q && (line_q == '0);
    ctl.bottom_line  = !prime_q && (line_q == LW'(LINES - 1));
  end

  assign busy  = (state_q != S_IDLE);
  assign done  = (state_q == S_FLUSH) && (phase_q == PH_EXECUTE);

  // Stores only happen in the two store clocks, and the single main memory
  // address bus never carries a read and a write together.
  a_write_slot: assert property (@(posedge clk) disable iff (!rst_n)
                                 ctl.mem_write |-> (phase_q inside {PH_STORE, PH_LOAD_R}))
    else $error("controller: main memory write outside a store step");
  a_bus_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
                                    !(ctl.mem_write && ctl.mem_read))
    else $error("controller: main memory read and write in one clock");

endmodule
