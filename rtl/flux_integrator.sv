// flux_integrator: on-line numerical integration of the coil voltage.
//
// The flux increment between two encoder triggers is the integral of the coil
// voltage over that interval.  With a fixed sampling period Ts it is Ts times
// the sum of the samples, so the block sums the corrected samples between two
// consecutive trigger rising edges and, at each trigger, releases one record
// holding the sum and the number of samples summed.  The number of samples
// times Ts is the time between the two triggers; the host scales both.
//
// While `arm` is low nothing is summed.  With `use_index` set, arming also
// waits for the zero (index) pulse of the encoder, so that the increments
// start at the angular origin of the coil; triggers before it are ignored
// and a trigger in the same clock as the index pulse counts.  After that
// the first trigger only opens the first interval; each further trigger closes the open one and
// opens the next, so a sample and a trigger in the same clock put the sample
// into the new interval.  `rec_valid` is a one-clock strobe in the clock after
// the trigger pulse.  After `n_rec` records (0 = no limit) `done` is set and
// summing stops until `arm` falls.  If an interval holds more than 2**CNT_W-1
// samples the count saturates and the record's `ovf` bit is set.
//
// Integration between rising trigger edges, one increment per trigger, the
// start on the zero-encoder edge and the interval measured in sampling
// periods follow the instrument description;
// the record layout and widths are this design's choices.
module flux_integrator
  import fdi_pkg::*;
#(
  parameter int unsigned SW = fdi_pkg::CORR_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                arm,
  input  logic [CNT_W-1:0]    n_rec,
  input  logic                use_index,     // wait for the zero pulse first
  input  logic                index,         // zero-encoder pulse
  input  logic signed [SW-1:0] sample,
  input  logic                sample_valid,
  input  logic                trig,
  output flux_rec_t           rec,
  output logic                rec_valid,
  output logic                started,
  output logic                done
);

  logic signed [ACC_W-1:0] acc;
  logic        [CNT_W-1:0] cnt;
  logic                    cnt_ovf;
  logic        [CNT_W-1:0] rec_cnt;
  logic                    active;
  logic                    index_seen;
  logic                    may_start;

  assign active    = arm && !done;
  assign may_start = !use_index || index_seen || index;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      cnt        <= '0;
      cnt_ovf    <= 1'b0;
      rec_cnt    <= '0;
      started    <= 1'b0;
      done       <= 1'b0;
      index_seen <= 1'b0;
      rec        <= '0;
      rec_valid  <= 1'b0;
    end else begin
      rec_valid <= 1'b0;
      if (!arm) begin
        index_seen <= 1'b0;
        started    <= 1'b0;
        done       <= 1'b0;
        rec_cnt    <= '0;
        acc        <= '0;
        cnt        <= '0;
        cnt_ovf    <= 1'b0;
      end else if (active) begin
        if (index) index_seen <= 1'b1;
        if (trig && may_start) begin
          if (started) begin
            rec.flux  <= acc;
            rec.nsamp <= cnt;
            rec.ovf   <= cnt_ovf;
            rec_valid <= 1'b1;
            rec_cnt   <= rec_cnt + 1'b1;
            if (n_rec != '0 && rec_cnt + 1'b1 == n_rec) done <= 1'b1;
          end
          started <= 1'b1;
          cnt_ovf <= 1'b0;
          if (sample_valid) begin
            acc <= ACC_W'(sample);
            cnt <= CNT_W'(1);
          end else begin
            acc <= '0;
            cnt <= '0;
          end
        end else if (started && sample_valid) begin
          acc <= acc + ACC_W'(sample);
          if (cnt == '1) cnt_ovf <= 1'b1;
          else           cnt     <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
