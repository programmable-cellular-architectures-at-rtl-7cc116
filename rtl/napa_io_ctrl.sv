// napa_io_ctrl: CMOS input-output controller of the NAPA array.
//
// It loads the pixel inputs serially over the row input rails and reads the
// outputs back over the row output rails, all rows in parallel, one column per
// step. Load: the host offers one column of ROWS pixels at a time on a
// valid/ready stream; each accepted column is pushed into the west end of the
// input rails and takes IO_PHASES control phases (cycles) to move one cell,
// so after COLS columns the first column offered sits in column COLS-1. A
// final u_load strobe makes every cell take its input. Read: out_capture
// copies every cell's output bit into its output-rail stage, then the column
// at the controller's edge (column 0 first) is offered on a valid/ready
// stream; each accepted column shifts the rails by one over IO_PHASES phases.
// A host that withholds in_valid or out_ready stalls the transfer.
// IO_PHASES = 4: the document's IO delay for an array equals its width times
// four times the single-phase IO delay; which four phases they are is not
// stated, and here only the last one moves the data. The handshake is this
// design's choice.
module napa_io_ctrl
  import napa_pkg::*;
#(
  parameter int unsigned ROWS      = 5,
  parameter int unsigned COLS      = 5,
  parameter int unsigned IO_PHASES = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // command from the sequencer
  input  logic              start_load,
  input  logic              start_read,
  output logic              busy,
  output logic              done,          // one-cycle pulse at the end
  // host streams
  input  logic              in_valid,
  output logic              in_ready,
  input  pix_t [ROWS-1:0]   in_col,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [ROWS-1:0]   out_col,
  // array side
  output pix_t [ROWS-1:0]   rail_in,
  input  logic [ROWS-1:0]   rail_out,
  output logic              io_shift,
  output logic              u_load,
  output logic              out_capture,
  output logic              out_shift
);
  localparam int unsigned CW = $clog2(COLS + 1);
  localparam int unsigned PW = $clog2(IO_PHASES + 1);

  typedef enum logic [2:0] {
    S_IDLE, S_LD_WAIT, S_LD_MOVE, S_LD_DONE, S_RD_CAP, S_RD_WAIT, S_RD_MOVE
  } state_e;

  state_e          state;
  logic [CW-1:0]   col;
  logic [PW-1:0]   phase;
  pix_t [ROWS-1:0] hold_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      col    <= '0;
      phase  <= '0;
      hold_q <= '0;
    end else begin
      case (state)
        S_IDLE: begin
          col   <= '0;
          phase <= '0;
          if (start_load)      state <= S_LD_WAIT;
          else if (start_read) state <= S_RD_CAP;
        end
        S_LD_WAIT: if (in_valid) begin
          hold_q <= in_col;
          phase  <= '0;
          state  <= S_LD_MOVE;
        end
        S_LD_MOVE: begin
          phase <= phase + 1'b1;
          if (phase == PW'(IO_PHASES - 1)) begin
            col   <= col + 1'b1;
            state <= (col == CW'(COLS - 1)) ? S_LD_DONE : S_LD_WAIT;
          end
        end
        S_LD_DONE: state <= S_IDLE;
        S_RD_CAP:  state <= S_RD_WAIT;
        S_RD_WAIT: if (out_ready) begin
          phase <= '0;
          state <= S_RD_MOVE;
        end
        S_RD_MOVE: begin
          phase <= phase + 1'b1;
          if (phase == PW'(IO_PHASES - 1)) begin
            col   <= col + 1'b1;
            state <= (col == CW'(COLS - 1)) ? S_IDLE : S_RD_WAIT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy        = (state != S_IDLE);
    in_ready    = (state == S_LD_WAIT);
    out_valid   = (state == S_RD_WAIT);
    out_col     = rail_out;
    rail_in     = hold_q;
    io_shift    = (state == S_LD_MOVE) && (phase == PW'(IO_PHASES - 1));
    u_load      = (state == S_LD_DONE);
    out_capture = (state == S_RD_CAP);
    out_shift   = (state == S_RD_MOVE) && (phase == PW'(IO_PHASES - 1));
    done        = u_load ||
                  ((state == S_RD_MOVE) && (phase == PW'(IO_PHASES - 1)) &&
                   (col == CW'(COLS - 1)));
  end

  // A started transfer is only accepted while idle.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (start_load || start_read) |-> state == S_IDLE);
  assert property (@(posedge clk) disable iff (!rst_n) !(start_load && start_read));
  // Offered output data stay put until taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid && $stable(out_col));
endmodule
