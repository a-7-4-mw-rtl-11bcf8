// ss_ctrl: sequencer of one sensing period.
//
// The procedure is the source design's: noise calibration with the RF input
// switched off, coarse sensing of the adjacent-band interferers, sensing-time
// adaptation (STA), residual PSD estimation with a channel-specific number of
// averages, then threshold adaptation (DTA) and the decision.  The
// controller follows the FFT output stream (fft_valid, fft_k2): a frame
// starts when bin k2 = 0 appears (first position of the bit-reversed output)
// and has 128 output cycles.  In an accumulating phase it lets SETTLE frames
// pass (so the window and FFT pipelines hold only data of the new phase),
// then enables accumulation for the phase's number of frames:
//   CAL    2^CAL_LOG2 frames into M2 (rf_off high)
//   COARSE 2^COARSE_LOG2 frames into M1
//   RESID  max_k M(k) frames into M1, each channel limited to its own M(k)
// acc_en / acc_tgt / acc_first / lim_en / frame_idx are registered and refer
// to the FFT output sample of the previous cycle; the top delays the FFT
// output by one register to meet them.
// After COARSE it waits for intf_ready (the host has read the coarse PSD and
// written the interfering powers).  The STA and DTA passes issue 256 read
// cycles each (pass_addr = 0..127, pass_sub = 0/1: lane u reads bank
// 2u + pass_sub, i.e. four channels per cycle), then wait DRAIN cycles for
// the lanes' pipelines.  The controller tracks the largest M(k) written by
// the STA to size the residual phase.
// Phase order and the 0.5-ms calibration follow the source design (2^7
// frames = 0.66 ms); frame counts for coarse sensing, SETTLE and the host
// handshake are this design's choices.
module ss_ctrl
  import ss_pkg::*;
#(
  parameter int CAL_LOG2    = 7,
  parameter int COARSE_LOG2 = 5,
  parameter int SETTLE      = 2,
  parameter int DRAIN       = 16,
  parameter int MK_W        = 14,
  parameter int LANES       = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            intf_ready,
  input  logic            fft_valid,
  input  logic [6:0]      fft_k2,
  input  logic            sta_valid,
  input  logic [MK_W-1:0] sta_m [LANES],
  output ss_state_t       state,
  output logic            rf_off,
  output logic            acc_en,
  output logic            acc_tgt,
  output logic            acc_first,
  output logic            lim_en,
  output logic [MK_W-1:0] frame_idx,
  output logic            pass_valid,
  output logic            pass_dta,
  output logic [6:0]      pass_addr,
  output logic            pass_sub,
  output logic [MK_W-1:0] resid_frames,
  output logic            done
);
  logic [MK_W:0]   fcnt;          // frames begun in this phase, settle included
  logic [MK_W:0]   nframes;       // frames to accumulate in this phase
  logic [8:0]      pcnt;
  logic [MK_W-1:0] mmax;
  logic            accum_state;
  logic            frame_start;

  logic [MK_W-1:0] lane_max;
  always_comb begin
    lane_max = '0;
    for (int u = 0; u < LANES; u++)
      if (sta_m[u] > lane_max) lane_max = sta_m[u];
  end

  assign accum_state = (state == ST_CAL) || (state == ST_COARSE) || (state == ST_RESID);
  assign frame_start = fft_valid && (fft_k2 == 7'd0);
  always_comb begin
    unique case (state)
      ST_CAL:    nframes = (MK_W+1)'(2 ** CAL_LOG2);
      ST_COARSE: nframes = (MK_W+1)'(2 ** COARSE_LOG2);
      default:   nframes = (MK_W+1)'(mmax);
    endcase
  end

  assign rf_off       = (state == ST_CAL);
  assign pass_valid   = (state == ST_STA) || (state == ST_DTA);
  assign pass_dta     = (state == ST_DTA);
  assign pass_addr    = pcnt[7:1];
  assign pass_sub     = pcnt[0];
  assign resid_frames = mmax;
  assign done         = (state == ST_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      fcnt      <= '0;
      pcnt      <= '0;
      mmax      <= '0;
      acc_en    <= 1'b0;
      acc_tgt   <= 1'b0;
      acc_first <= 1'b0;
      lim_en    <= 1'b0;
      frame_idx <= '0;
    end else begin
      // per-sample accumulation control
      if (fft_valid) begin
        if (!accum_state) begin
          acc_en <= 1'b0;
        end else if (frame_start) begin
          acc_en    <= (int'(fcnt) >= SETTLE) && (fcnt < nframes + (MK_W+1)'(SETTLE));
          acc_first <= (int'(fcnt) == SETTLE);
          frame_idx <= MK_W'(fcnt - (MK_W+1)'(SETTLE));
          acc_tgt   <= (state == ST_CAL);
          lim_en    <= (state == ST_RESID);
        end
      end

      // STA results: track the longest sensing time
      if (sta_valid && (state == ST_STA || state == ST_STA_DRAIN) && lane_max > mmax)
        mmax <= lane_max;

      unique case (state)
        ST_IDLE, ST_DONE: begin
          if (start) begin
            state <= ST_CAL;
            fcnt  <= '0;
          end
        end
        ST_CAL, ST_COARSE, ST_RESID: begin
          if (frame_start) begin
            if (fcnt == nframes + (MK_W+1)'(SETTLE)) begin
              fcnt  <= '0;
              state <= (state == ST_CAL) ? ST_COARSE :
                       (state == ST_COARSE) ? ST_WAIT_INTF : ST_DTA;
              pcnt  <= '0;
            end else begin
              fcnt <= fcnt + 1'b1;
            end
          end
        end
        ST_WAIT_INTF: begin
          if (intf_ready) begin
            state <= ST_STA;
            pcnt  <= '0;
            mmax  <= '0;
          end
        end
        ST_STA, ST_DTA: begin
          pcnt <= pcnt + 1'b1;
          if (pcnt == 9'd255) begin
            pcnt  <= '0;
            state <= (state == ST_STA) ? ST_STA_DRAIN : ST_DTA_DRAIN;
          end
        end
        ST_STA_DRAIN, ST_DTA_DRAIN: begin
          pcnt <= pcnt + 1'b1;
          if (int'(pcnt) == DRAIN - 1) begin
            pcnt  <= '0;
            fcnt  <= '0;
            state <= (state == ST_STA_DRAIN) ? ST_RESID : ST_DONE;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end
endmodule
