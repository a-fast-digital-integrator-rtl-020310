// self_cal: dichotomic self-calibration of offset and gain.
//
// Calibration runs in three steps, each a 16-step dichotomic (bisection)
// search of a 16-bit code:
//   1. input shorted (IN_SHORT): search the offset DAC code at which the ADC
//      output reaches the zero code;
//   2. input on the voltage reference (IN_VREF): search the gain
//      potentiometer code at which the ADC output reaches the most positive
//      code (full scale);
//   3. input on the coil (IN_COIL): search the offset DAC code again until
//      the ADC output reaches the zero code.
// A search finds the smallest code whose ADC output is at or above the
// target, assuming the ADC output grows with the code.  It first tries the
// all-ones code: if even that stays below the target the step fails, `err`
// is set and `err_step` names the step.  Then, from the most significant bit
// down, it clears one bit at a time and keeps it cleared when the ADC output
// is still at or above the target.  Every trial drives the new code, waits
// SETTLE clocks for the analog chain and takes the next ADC sample; a step
// therefore costs 17 samples.  After step 3 one more sample at the final code
// is kept as the residual offset `resid`, for the digital correction.
//
// `start` is a one-clock pulse; `busy` is high until `done` or `err` pulses.
// `dac_code` and `pot_code` hold their last values between calibrations.
//
// The three steps, their targets, the 16-bit resolution and the dichotomic
// search follow the instrument description.  The search direction (code
// rising with ADC output), the all-ones pre-check, the settling wait and the
// residual offset capture are this design's choices.
module self_cal
  import fdi_pkg::in_sel_e, fdi_pkg::IN_COIL, fdi_pkg::IN_SHORT, fdi_pkg::IN_VREF;
#(
  parameter int unsigned ADC_W  = fdi_pkg::ADC_W,
  parameter int unsigned CAL_W  = fdi_pkg::CAL_W,
  parameter int unsigned SETTLE = 64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [ADC_W-1:0] sample,
  input  logic                    sample_valid,
  output in_sel_e                 in_sel,
  output logic [CAL_W-1:0]        dac_code,
  output logic [CAL_W-1:0]        pot_code,
  output logic [CAL_W-1:0]        dac_short,   // result of step 1
  output logic signed [ADC_W-1:0] resid,       // ADC output after step 3
  output logic                    busy,
  output logic                    done,
  output logic                    err,
  output logic [1:0]              err_step     // 1..3
);

  localparam logic signed [ADC_W-1:0] ZERO_CODE = '0;
  localparam logic signed [ADC_W-1:0] FULL_CODE = {1'b0, {(ADC_W-1){1'b1}}};
  localparam int unsigned SW = (SETTLE < 2) ? 1 : $clog2(SETTLE + 1);
  localparam int unsigned BW = $clog2(CAL_W + 1);

  typedef enum logic [2:0] {S_IDLE, S_SETTLE, S_SAMPLE, S_RESID_SETTLE, S_RESID} cal_state_e;

  cal_state_e              st;
  logic [1:0]              step;      // 1..3
  logic [BW-1:0]           bit_idx;   // CAL_W = pre-check, else bit on trial
  logic [CAL_W-1:0]        code;      // best code so far
  logic [CAL_W-1:0]        trial;     // code under test
  logic [SW-1:0]           settle_cnt;
  logic signed [ADC_W-1:0] target;
  logic                    hit;
  logic [CAL_W-1:0]        pot_q;     // gain result, held

  assign target = (step == 2'd2) ? FULL_CODE : ZERO_CODE;
  assign hit    = (sample >= target);

  // Drive the analog chain: the code under test goes to the device searched.
  always_comb begin
    in_sel   = IN_COIL;
    dac_code = code;
    pot_code = pot_q;
    if (busy) begin
      unique case (step)
        2'd1:    in_sel = IN_SHORT;
        2'd2:    in_sel = IN_VREF;
        default: in_sel = IN_COIL;
      endcase
    end
    if (busy && step != 2'd2 && st != S_RESID_SETTLE && st != S_RESID) dac_code = trial;
    if (busy && step == 2'd2) begin
      dac_code = dac_short;
      pot_code = trial;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      step       <= 2'd1;
      bit_idx    <= '0;
      code       <= {1'b1, {(CAL_W-1){1'b0}}};   // mid-scale
      trial      <= '0;
      pot_q      <= {1'b1, {(CAL_W-1){1'b0}}};
      dac_short  <= {1'b1, {(CAL_W-1){1'b0}}};
      resid      <= '0;
      settle_cnt <= '0;
      busy       <= 1'b0;
      done       <= 1'b0;
      err        <= 1'b0;
      err_step   <= '0;
    end else begin
      done <= 1'b0;
      err  <= 1'b0;
      unique case (st)
        S_IDLE: begin
          if (start) begin
            busy       <= 1'b1;
            err_step   <= '0;
            step       <= 2'd1;
            bit_idx    <= BW'(CAL_W);
            trial      <= '1;
            settle_cnt <= '0;
            st         <= S_SETTLE;
          end
        end
        S_SETTLE, S_RESID_SETTLE: begin
          if (settle_cnt == SW'(SETTLE - 1)) begin
            settle_cnt <= '0;
            st         <= (st == S_SETTLE) ? S_SAMPLE : S_RESID;
          end else begin
            settle_cnt <= settle_cnt + 1'b1;
          end
        end
        S_SAMPLE: begin
          if (sample_valid) begin
            if (bit_idx == BW'(CAL_W)) begin
              // pre-check with the all-ones code
              if (!hit) begin
                busy     <= 1'b0;
                err      <= 1'b1;
                err_step <= step;
                st       <= S_IDLE;
              end else begin
                code    <= '1;
                bit_idx <= BW'(CAL_W - 1);
                trial   <= '1 & ~(CAL_W'(1) << (CAL_W - 1));
                st      <= S_SETTLE;
              end
            end else begin
              logic [CAL_W-1:0] best;
              best = hit ? trial : code;
              if (bit_idx == '0) begin
                // search of this step finished
                unique case (step)
                  2'd1: begin
                    dac_short <= best;
                    code      <= best;
                    step      <= 2'd2;
                    bit_idx   <= BW'(CAL_W);
                    trial     <= '1;
                    st        <= S_SETTLE;
                  end
                  2'd2: begin
                    pot_q   <= best;
                    code    <= dac_short;
                    step    <= 2'd3;
                    bit_idx <= BW'(CAL_W);
                    trial   <= '1;
                    st      <= S_SETTLE;
                  end
                  default: begin
                    code <= best;
                    st   <= S_RESID_SETTLE;
                  end
                endcase
              end else begin
                code    <= best;
                bit_idx <= bit_idx - 1'b1;
                trial   <= best & ~(CAL_W'(1) << (bit_idx - 1'b1));
                st      <= S_SETTLE;
              end
            end
          end
        end
        S_RESID: begin
          if (sample_valid) begin
            resid <= sample;
            busy  <= 1'b0;
            done  <= 1'b1;
            step  <= 2'd1;
            st    <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
