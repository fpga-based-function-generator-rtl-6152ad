// rotary_encoder: decoder for the rotary knob and its push button.
//
// The knob's two quadrature contacts (rot_a, rot_b) and its push contact
// (rot_center) are asynchronous and bounce. Each is brought into the clock
// domain through a 2-stage shift register. The quadrature pair is then
// filtered the usual way for this kind of knob: q1 is set when both contacts
// are closed and cleared when both are open, q2 is set when only B is closed
// and cleared when only A is closed, and bounce on one contact cannot change
// either. Each rising edge of q1 is one detent: turn_up if q2 is low
// (clockwise), turn_down if q2 is high. The push contact must be stable for
// DEBOUNCE cycles before its level is accepted; a press pulses on the
// accepted rising edge. The original design has the knob changes the frequency; the
// filtering, the direction convention and the debounce time (1 ms at 50 MHz)
// are this implementation's.
//
// Timing: a turn pulse is registered 4 cycles after the contact edge that
// completes a detent; a press pulse DEBOUNCE+2 cycles after the push contact
// settles.
module rotary_encoder #(
  parameter int unsigned DEBOUNCE = 50_000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rot_a,
  input  logic rot_b,
  input  logic rot_center,
  output logic turn_up,
  output logic turn_down,
  output logic press
);

  localparam int unsigned CW = $clog2(DEBOUNCE + 1);

  logic [1:0]    sync_a, sync_b, sync_c;
  logic          q1, q2, q1_d;
  logic [CW-1:0] db_cnt;
  logic          c_level;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_a    <= '0;
      sync_b    <= '0;
      sync_c    <= '0;
      q1        <= 1'b0;
      q2        <= 1'b0;
      q1_d      <= 1'b0;
      db_cnt    <= '0;
      c_level   <= 1'b0;
      turn_up   <= 1'b0;
      turn_down <= 1'b0;
      press     <= 1'b0;
    end else begin
      sync_a <= {sync_a[0], rot_a};
      sync_b <= {sync_b[0], rot_b};
      sync_c <= {sync_c[0], rot_center};

      unique case ({sync_a[1], sync_b[1]})
        2'b11: q1 <= 1'b1;
        2'b00: q1 <= 1'b0;
        2'b01: q2 <= 1'b1;
        2'b10: q2 <= 1'b0;
        default: ;
      endcase
      q1_d      <= q1;
      turn_up   <= q1 & ~q1_d & ~q2;
      turn_down <= q1 & ~q1_d & q2;

      press <= 1'b0;
      if (sync_c[1] == c_level) begin
        db_cnt <= '0;
      end else if (db_cnt == CW'(DEBOUNCE - 1)) begin
        db_cnt  <= '0;
        c_level <= sync_c[1];
        press   <= sync_c[1];
      end else begin
        db_cnt <= db_cnt + 1'b1;
      end
    end
  end

endmodule
