// pw_timer: programmable delay timer used by a decision state machine.
//
// The document provides programmable timers so that the state machines can
// defer actions (for example an interframe gap or a backoff slot). The 68020
// writes the delay into a load register; a start pulse from the state
// machine copies it into a down counter that decrements on every tick (one
// bit period of the channel clock in this design). expired is high for one
// clock when the counter reaches zero, and stays available as the level
// "done" until the next start. A start while running restarts the delay.
module pw_timer #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] load,     // delay in ticks, from the 68020
  input  logic         start,
  input  logic         tick,
  output logic         expired,  // one-clock pulse
  output logic         done,     // level, high after expiry until next start
  output logic         running
);
  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; running <= 1'b0; expired <= 1'b0; done <= 1'b0;
    end else begin
      expired <= 1'b0;
      if (start) begin
        done <= 1'b0;
        if (load == '0) begin
          running <= 1'b0; expired <= 1'b1; done <= 1'b1;
        end else begin
          cnt <= load; running <= 1'b1;
        end
      end else if (running && tick) begin
        if (cnt == W'(1)) begin
          running <= 1'b0; expired <= 1'b1; done <= 1'b1;
        end
        cnt <= cnt - 1'b1;
      end
    end
  end
endmodule
