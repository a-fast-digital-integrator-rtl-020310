// bus_regs: command, configuration, status and data registers of the board.
//
// The host reaches the instrument through a simple synchronous local bus:
// one word address, a write strobe with data, and a read strobe answered one
// clock later on `bus_rdata` with `bus_rvalid`.  Register map (word
// addresses, 32-bit data):
//   0x0 CMD        W   bits[2:0] user command; a write pulses `cmd_valid`
//   0x1 STATUS     R   [18:0] instrument_status, [19] sticky over-range,
//                      [20] flux buffer empty, [21] PGA settling,
//                      [31:22] flux buffer fill level (saturating)
//                  W   a 1 in bit 19 clears the sticky over-range flag
//   0x2 RANGE      RW  [3:0] requested full-scale range (pending)
//   0x3 SAMPLE_DIV RW  [15:0] clocks per ADC sample (pending)
//   0x4 N_POINTS   RW  [23:0] flux increments per measurement, 0 = endless
//   0x5 GAIN       RW  [15:0] gain correction coefficient, 1.0 = 0x8000
//   0x6 CAL_DAC    R   [31:16] offset DAC code, shorted input;
//                      [15:0] offset DAC code, coil input
//   0x7 CAL_POT    R   [15:0] gain potentiometer code
//   0x8 RESID      R   residual offset in ADC codes, sign-extended
//   0x9 FLUX_LO    R   flux sum of the oldest increment, bits 31:0
//   0xA FLUX_HI    R   [31] counter saturated, [15:0] flux sum bits 47:32
//   0xB FLUX_N     R   samples in the oldest increment; reading it removes
//                      the increment from the buffer
//   0xC FULL_SCALE R   full scale of the active range in mV
//   0xD IRQ_EN     RW  [0] ADC, [1] FPGA, [2] priority-0 interrupt enable
//   0xE MODE       RW  [0] start each measurement on the zero-encoder pulse
//                      (pending)
//   0xF CAL_PERIOD RW  clocks between automatic self-calibrations, 0 = off
//                      (takes effect at once)
// Registers marked pending take effect only when a configuration command is
// accepted (`cfg_ok`), so a measurement never sees half a configuration.
// Interrupts: ADC = one pulse per sample, FPGA = flux data waiting,
// priority 0 = instrument in error.
//
// That processor and FPGA exchange commands and data through registers, the
// local bus, the flux data path and the names of the three interrupts follow
// the instrument description; the register map, the bus timing and the
// meaning given to each interrupt are this design's choices.
module bus_regs
  import fdi_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  // local bus
  input  logic [3:0]              bus_addr,
  input  logic                    bus_wr,
  input  logic [BUS_W-1:0]        bus_wdata,
  input  logic                    bus_rd,
  output logic [BUS_W-1:0]        bus_rdata,
  output logic                    bus_rvalid,
  // commands
  output logic                    cmd_valid,
  output cmd_e                    cmd,
  // configuration
  output logic [3:0]              range_req,
  input  logic                    cfg_ok,
  output logic [15:0]             sample_div,
  output logic [CNT_W-1:0]        n_points,
  output logic [15:0]             gain,
  output logic                    use_index,
  output logic [31:0]             cal_period,
  // status and calibration results
  input  status_t                 status,
  input  logic                    pga_settling,
  input  logic [16:0]             full_scale_mv,
  input  logic                    ovr_evt,
  output logic                    ovr_sticky,
  input  logic [CAL_W-1:0]        dac_short,
  input  logic [CAL_W-1:0]        dac_coil,
  input  logic [CAL_W-1:0]        pot_code,
  input  logic signed [ADC_W-1:0] resid,
  // flux buffer
  input  flux_rec_t               flux_head,
  input  logic                    flux_empty,
  input  logic [9:0]              flux_count,
  output logic                    flux_pop,
  // interrupts
  input  logic                    sample_evt,
  output logic                    adc_irq,
  output logic                    fpga_irq,
  output logic                    prio0_irq
);

  localparam logic [3:0] A_CMD = 4'h0, A_STATUS = 4'h1, A_RANGE = 4'h2,
                         A_DIV = 4'h3, A_NPTS = 4'h4, A_GAIN = 4'h5,
                         A_CALDAC = 4'h6, A_CALPOT = 4'h7, A_RESID = 4'h8,
                         A_FLO = 4'h9, A_FHI = 4'hA, A_FN = 4'hB,
                         A_FS = 4'hC, A_IRQ = 4'hD, A_MODE = 4'hE,
                         A_CPER = 4'hF;

  logic [15:0]      div_pend;
  logic [CNT_W-1:0] npts_pend;
  logic [15:0]      gain_pend;
  logic [2:0]       irq_en;
  logic             mode_pend;

  // The oldest increment leaves the buffer in the clock that reads FLUX_N.
  assign flux_pop = bus_rd && (bus_addr == A_FN) && !flux_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_valid  <= 1'b0;
      cmd        <= CMD_NONE;
      range_req  <= 4'd6;
      div_pend   <= 16'd25;
      npts_pend  <= CNT_W'(512);
      gain_pend  <= 16'h8000;
      sample_div <= 16'd25;
      n_points   <= CNT_W'(512);
      gain       <= 16'h8000;
      irq_en     <= '0;
      mode_pend  <= 1'b0;
      use_index  <= 1'b0;
      cal_period <= '0;
      ovr_sticky <= 1'b0;
      bus_rdata  <= '0;
      bus_rvalid <= 1'b0;
      adc_irq    <= 1'b0;
      fpga_irq   <= 1'b0;
      prio0_irq  <= 1'b0;
    end else begin
      cmd_valid  <= 1'b0;
      bus_rvalid <= 1'b0;
      if (ovr_evt) ovr_sticky <= 1'b1;

      if (bus_wr) begin
        unique case (bus_addr)
          A_CMD: begin
            cmd_valid <= 1'b1;
            cmd       <= cmd_e'(bus_wdata[2:0]);
          end
          A_STATUS: if (bus_wdata[19] && !ovr_evt) ovr_sticky <= 1'b0;
          A_RANGE:  range_req <= bus_wdata[3:0];
          A_DIV:    div_pend  <= bus_wdata[15:0];
          A_NPTS:   npts_pend <= bus_wdata[CNT_W-1:0];
          A_GAIN:   gain_pend <= bus_wdata[15:0];
          A_IRQ:    irq_en    <= bus_wdata[2:0];
          A_MODE:   mode_pend <= bus_wdata[0];
          A_CPER:   cal_period <= bus_wdata;
          default: ;
        endcase
      end

      if (cfg_ok) begin
        sample_div <= div_pend;
        n_points   <= npts_pend;
        gain       <= gain_pend;
        use_index  <= mode_pend;
      end

      if (bus_rd) begin
        bus_rvalid <= 1'b1;
        unique case (bus_addr)
          A_STATUS: bus_rdata <= {flux_count, pga_settling, flux_empty, ovr_sticky, status};
          A_RANGE:  bus_rdata <= BUS_W'(range_req);
          A_DIV:    bus_rdata <= BUS_W'(div_pend);
          A_NPTS:   bus_rdata <= BUS_W'(npts_pend);
          A_GAIN:   bus_rdata <= BUS_W'(gain_pend);
          A_CALDAC: bus_rdata <= {dac_short, dac_coil};
          A_CALPOT: bus_rdata <= BUS_W'(pot_code);
          A_RESID:  bus_rdata <= BUS_W'(resid);
          A_FLO:    bus_rdata <= flux_head.flux[31:0];
          A_FHI:    bus_rdata <= {flux_head.ovf, 15'd0, flux_head.flux[ACC_W-1:32]};
          A_FN: begin
            bus_rdata <= BUS_W'(flux_head.nsamp);
          end
          A_FS:     bus_rdata <= BUS_W'(full_scale_mv);
          A_IRQ:    bus_rdata <= BUS_W'(irq_en);
          A_MODE:   bus_rdata <= BUS_W'(mode_pend);
          A_CPER:   bus_rdata <= cal_period;
          default:  bus_rdata <= '0;
        endcase
      end

      adc_irq   <= irq_en[0] && sample_evt;
      fpga_irq  <= irq_en[1] && !flux_empty;
      prio0_irq <= irq_en[2] && status.err;
    end
  end

endmodule
