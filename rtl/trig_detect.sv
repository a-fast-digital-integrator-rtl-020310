// trig_detect: encoder trigger input conditioning.
//
// The encoder on the coil shaft delivers a pulse train; every rising edge
// closes one integration interval.  The asynchronous input passes through a
// two-flip-flop synchroniser and a glitch filter that accepts a new level only
// after it has been stable for FILT consecutive clocks.  `rise` is a
// one-clock pulse FILT+2 clocks after a clean rising edge of `trig_in`;
// `level` is the filtered input.
//
// Acting on rising edges follows the instrument description.  The
// synchroniser and the glitch filter (length 4 clocks, 200 ns at 20 MHz,
// well below the 50 us period of a 20 kHz trigger) are this design's choices.
module trig_detect #(
  parameter int unsigned FILT = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trig_in,
  output logic level,
  output logic rise
);

  localparam int unsigned FW = (FILT < 2) ? 1 : $clog2(FILT + 1);

  logic [1:0]    sync;
  logic [FW-1:0] stable_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync       <= '0;
      stable_cnt <= '0;
      level      <= 1'b0;
      rise       <= 1'b0;
    end else begin
      sync <= {sync[0], trig_in};
      rise <= 1'b0;
      if (sync[1] == level) begin
        stable_cnt <= '0;
      end else if (stable_cnt == FW'(FILT - 1)) begin
        stable_cnt <= '0;
        level      <= sync[1];
        rise       <= sync[1];
      end else begin
        stable_cnt <= stable_cnt + 1'b1;
      end
    end
  end

endmodule
