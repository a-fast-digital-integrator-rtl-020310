// local_io: front-panel reset, power switch and indicators.
//
// The board reset is asserted at once (asynchronously) while the power-on
// reset `por_n` is low, while the ON switch is off, or while the reset
// button is held, and released synchronously two clocks after all three
// are gone.  The button input is synchronised and debounced: a new button
// level is accepted only after DEBOUNCE stable clocks.  The over-range and
// error indicators are stretched: an over-range event lights `led_ovr` for
// at least STRETCH clocks, and `led_err` follows the error flag but also
// stays on for at least STRETCH clocks, so a short event stays visible.
//
// The reset input, the ON input and the over-range and error outputs of the
// local I/O follow the board architecture; the debouncing, the stretching,
// their lengths (1 ms debounce and 100 ms indication at 20 MHz) and the
// active levels are this design's choices.
module local_io #(
  parameter int unsigned DEBOUNCE = 20_000,
  parameter int unsigned STRETCH  = 2_000_000
) (
  input  logic clk,
  input  logic por_n,        // power-on reset, active low
  input  logic on_sw,        // ON switch, 1 = on
  input  logic btn_reset_n,  // reset button, active low, may bounce
  input  logic ovr_evt,      // over-range event, one clock
  input  logic err_lvl,      // instrument error flag
  output logic rst_n_out,    // board reset, active low
  output logic led_ovr,
  output logic led_err
);

  localparam int unsigned DW = $clog2(DEBOUNCE + 1);
  localparam int unsigned LW = $clog2(STRETCH + 1);

  logic [1:0]    btn_sync;
  logic          btn_pressed;  // debounced level
  logic [DW-1:0] deb_cnt;
  logic [LW-1:0] ovr_cnt, err_cnt;
  logic          rst_req_n;
  logic [1:0]    rst_sync;

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) begin
      btn_sync    <= 2'b11;
      btn_pressed <= 1'b0;
      deb_cnt     <= '0;
    end else begin
      btn_sync <= {btn_sync[0], btn_reset_n};
      if ((!btn_sync[1]) == btn_pressed) begin
        deb_cnt <= '0;
      end else if (deb_cnt == DW'(DEBOUNCE - 1)) begin
        deb_cnt     <= '0;
        btn_pressed <= !btn_sync[1];
      end else begin
        deb_cnt <= deb_cnt + 1'b1;
      end
    end
  end

  assign rst_req_n = por_n && on_sw && !btn_pressed;

  always_ff @(posedge clk or negedge rst_req_n) begin
    if (!rst_req_n) rst_sync <= 2'b00;
    else            rst_sync <= {rst_sync[0], 1'b1};
  end
  assign rst_n_out = rst_sync[1];

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) begin
      ovr_cnt <= '0;
      err_cnt <= '0;
    end else begin
      if (ovr_evt)              ovr_cnt <= LW'(STRETCH);
      else if (ovr_cnt != '0)   ovr_cnt <= ovr_cnt - 1'b1;
      if (err_lvl)              err_cnt <= LW'(STRETCH);
      else if (err_cnt != '0)   err_cnt <= err_cnt - 1'b1;
    end
  end

  assign led_ovr = (ovr_cnt != '0);
  assign led_err = err_lvl || (err_cnt != '0);

endmodule
