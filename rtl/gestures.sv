// gestures: recognises a wrist-tilt gesture and packs it into a control byte.
//
// Three-state FSM (IDLE -> RECORD -> ANALYZE -> IDLE), as in the document:
//  * IDLE waits until one filtered magnitude reaches its threshold
//    (X_THRESH, Y_THRESH, Z_THRESH). If several do in the same cycle, Z wins
//    over Y and Y over X. The axis and its sign are captured.
//  * RECORD waits until that axis falls back below its threshold, then sets
//    the control for the axis and direction: X +/- = volume up/down,
//    Y +/- = next/previous song, Z +/- = play/pause.
//  * ANALYZE puts the controls into one byte (gmp_pkg::ctrl_byte_t), raises
//    done for one clock and returns to IDLE.
// Capturing the sign at the threshold crossing rather than at the release is
// this design's choice. Sign inputs are 1 for a negative direction.
// Play and pause follow the direction of the Z tilt, as the description
// states, rather than alternating on each Z tilt.
// Timing: done and val_out are registered; val_out holds until the next
// gesture completes.
module gestures
  import gmp_pkg::*;
#(
  parameter logic [11:0] X_THRESH = 12'h0A0,
  parameter logic [11:0] Y_THRESH = 12'h0A0,
  parameter logic [11:0] Z_THRESH = 12'h245
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [11:0] x_mag_filtered,
  input  logic [11:0] y_mag_filtered,
  input  logic [11:0] z_mag_filtered,
  input  logic        x_sign,
  input  logic        y_sign,
  input  logic        z_sign,
  output ctrl_byte_t  val_out,
  output logic        done,
  output logic [2:0]  axis_light   // {z, y, x}: axis of the last gesture
);

  typedef enum logic [1:0] {IDLE, RECORD, ANALYZE} state_t;
  typedef enum logic [1:0] {AXIS_X, AXIS_Y, AXIS_Z} axis_t;

  state_t     state;
  axis_t      axis;
  logic       neg;       // captured direction, 1 = negative
  ctrl_byte_t controls;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= IDLE;
      axis       <= AXIS_X;
      neg        <= 1'b0;
      controls   <= '0;
      val_out    <= '0;
      done       <= 1'b0;
      axis_light <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: begin
          controls <= '0;
          if (z_mag_filtered >= Z_THRESH) begin
            axis <= AXIS_Z; neg <= z_sign; state <= RECORD;
          end else if (y_mag_filtered >= Y_THRESH) begin
            axis <= AXIS_Y; neg <= y_sign; state <= RECORD;
          end else if (x_mag_filtered >= X_THRESH) begin
            axis <= AXIS_X; neg <= x_sign; state <= RECORD;
          end
        end
        RECORD: begin
          unique case (axis)
            AXIS_X: if (x_mag_filtered < X_THRESH) begin
              controls.vol_up   <= ~neg;
              controls.vol_down <= neg;
              axis_light        <= 3'b001;
              state             <= ANALYZE;
            end
            AXIS_Y: if (y_mag_filtered < Y_THRESH) begin
              controls.next_song <= ~neg;
              controls.prev_song <= neg;
              axis_light         <= 3'b010;
              state              <= ANALYZE;
            end
            default: if (z_mag_filtered < Z_THRESH) begin
              controls.play  <= ~neg;
              controls.pause <= neg;
              axis_light     <= 3'b100;
              state          <= ANALYZE;
            end
          endcase
        end
        default: begin // ANALYZE
          val_out <= controls;
          done    <= 1'b1;
          state   <= IDLE;
        end
      endcase
    end
  end

  // exactly one control is set in every byte sent
  a_one_hot: assert property (@(posedge clk) disable iff (rst) done |-> $onehot(val_out));

endmodule
