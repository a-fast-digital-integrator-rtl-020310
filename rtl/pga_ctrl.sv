// pga_ctrl: supervision of the programmable-gain input amplifier.
//
// The input has ten full-scale ranges: 0.1, 0.25, 0.5, 1, 2.5, 5, 10, 25, 50
// and 100 V.  A range is requested by its index (0 = 0.1 V ... 9 = 100 V) and
// taken over on the `apply` pulse.  A valid request drives the new index onto
// the PGA gain pins and onto the selection of the voltage-reference output
// used for gain calibration (the reference must match the range to bring the
// ADC to full scale), reports the full scale in millivolts and raises
// `settling` for SETTLE clocks while the amplifier settles.  An index above 9
// leaves everything unchanged and pulses `cfg_err`.  `cfg_ok` / `cfg_err`
// pulse one clock after `apply`.
//
// The ten ranges and the reference following the selected gain follow the
// instrument description.  The pin coding (the range index itself), the
// settling time (1000 clocks, 50 us at 20 MHz) and the reset range (10 V)
// are this design's choices.
module pga_ctrl #(
  parameter int unsigned SETTLE = 1000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        apply,
  input  logic [3:0]  range_req,
  output logic [3:0]  pga_gain,
  output logic [3:0]  vref_sel,
  output logic [16:0] fs_mv,
  output logic        settling,
  output logic        cfg_ok,
  output logic        cfg_err
);

  localparam int unsigned SW = (SETTLE < 2) ? 1 : $clog2(SETTLE + 1);
  localparam logic [3:0]  RESET_RANGE = 4'd6;

  logic [3:0]    range_q;
  logic [SW-1:0] settle_cnt;

  function automatic logic [16:0] full_scale_mv(input logic [3:0] r);
    unique case (r)
      4'd0:    return 17'd100;
      4'd1:    return 17'd250;
      4'd2:    return 17'd500;
      4'd3:    return 17'd1000;
      4'd4:    return 17'd2500;
      4'd5:    return 17'd5000;
      4'd6:    return 17'd10000;
      4'd7:    return 17'd25000;
      4'd8:    return 17'd50000;
      4'd9:    return 17'd100000;
      default: return 17'd0;
    endcase
  endfunction

  assign pga_gain = range_q;
  assign vref_sel = range_q;
  assign fs_mv    = full_scale_mv(range_q);
  assign settling = (settle_cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      range_q    <= RESET_RANGE;
      settle_cnt <= SW'(SETTLE);
      cfg_ok     <= 1'b0;
      cfg_err    <= 1'b0;
    end else begin
      cfg_ok  <= 1'b0;
      cfg_err <= 1'b0;
      if (settle_cnt != '0) settle_cnt <= settle_cnt - 1'b1;
      if (apply) begin
        if (range_req < 4'(fdi_pkg::N_RANGES)) begin
          cfg_ok <= 1'b1;
          if (range_req != range_q) begin
            range_q    <= range_req;
            settle_cnt <= SW'(SETTLE);
          end
        end else begin
          cfg_err <= 1'b1;
        end
      end
    end
  end

endmodule
