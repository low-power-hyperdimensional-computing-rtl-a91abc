// hdc_controller: sequences the folded encoding pipeline for one feature sample.
//
// For each of the F folds it spends one cycle loading the first iM fold, T cycles
// streaming channels 0..T-1 (one per cycle) into the spatial encoder, one cycle fusing
// the last modality and one cycle writing the fused fold into hvout: F*(T+3) cycles.
// Channels are grouped by modality in the order of MOD_CH; on the first channel of
// modality m > 0 the spatial encoder restarts its counters while the fuser takes the
// majority of modality m-1 in the same cycle. After the last fold the temporal encoder
// shifts the new hypervector in, then the associative memory is started on the new
// ngram vector (once N samples have been taken). If the associative memory is still
// busy with the previous query, the shift waits (a stall), so the query it reads
// never changes under it. A sample is accepted with in_valid && in_ready; in_ready is
// high only in the idle state. With in_valid held high a sample is accepted every
// F*(T+3)+3 cycles: 871 at the default sizes.
//
// The sequence (channel per cycle, folds one after another, TE unfolded, AM overlapped
// with the next sample's encoding) follows the source architecture; the state machine,
// its cycle budget and the stall are this design's own.
module hdc_controller
  import hdc_pkg::*;
#(
  parameter int unsigned F = F_DEF,
  parameter int unsigned M = M_DEF,
  parameter int unsigned MOD_CH [M] = '{32, 77, 105},
  parameter int unsigned T = 214,
  parameter int unsigned C_MAX = 105,
  localparam int unsigned FOLD_W = (F > 1) ? $clog2(F) : 1,
  localparam int unsigned CH_W   = (T > 1) ? $clog2(T) : 1,
  localparam int unsigned MI_W   = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned NW     = $clog2(C_MAX + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic              am_busy,
  input  logic              te_filled,
  // HV generator
  output logic              hv_load,
  output logic              im_init,
  output logic              im_step,
  output logic [FOLD_W-1:0] fold,
  output logic [CH_W-1:0]   chan,
  // spatial encoder
  output logic              se_valid,
  output logic              se_first,
  output logic [NW-1:0]     se_mod_n,
  // fuser
  output logic              fu_add,
  output logic              fu_first,
  output logic              fu_write,
  // temporal encoder and associative memory
  output logic              te_shift,
  output logic              am_start
);

  ctrl_state_e       state_q;
  logic [FOLD_W-1:0] f_q;
  logic [CH_W-1:0]   ch_q;
  logic [MI_W-1:0]   mod_q;     // modality of channel ch_q
  logic [NW-1:0]     rem_q;     // channels of that modality left after ch_q
  logic              first_q;   // ch_q is the first channel of its modality

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      f_q     <= '0;
      ch_q    <= '0;
      mod_q   <= '0;
      rem_q   <= '0;
      first_q <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: if (in_valid) begin
          f_q     <= '0;
          state_q <= S_IM_INIT;
        end
        S_IM_INIT: begin
          ch_q    <= '0;
          mod_q   <= '0;
          rem_q   <= NW'(MOD_CH[0] - 1);
          first_q <= 1'b1;
          state_q <= S_CHAN;
        end
        S_CHAN: begin
          ch_q <= ch_q + 1'b1;
          if (rem_q == '0) begin
            if (int'(mod_q) + 1 < int'(M)) begin
              mod_q <= mod_q + 1'b1;
              rem_q <= NW'(MOD_CH[int'(mod_q) + 1] - 1);
            end
            first_q <= 1'b1;
          end else begin
            rem_q   <= rem_q - 1'b1;
            first_q <= 1'b0;
          end
          if (ch_q == CH_W'(T - 1)) state_q <= S_FUSE_LAST;
        end
        S_FUSE_LAST: state_q <= S_WRITE;
        S_WRITE: begin
          if (f_q == FOLD_W'(F - 1)) begin
            state_q <= S_TE_WAIT;
          end else begin
            f_q     <= f_q + 1'b1;
            state_q <= S_IM_INIT;
          end
        end
        S_TE_WAIT: if (!am_busy) state_q <= S_AM_START;
        S_AM_START: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    in_ready = (state_q == S_IDLE);
    hv_load  = (state_q == S_IDLE) && in_valid;
    im_init  = (state_q == S_IM_INIT);
    im_step  = (state_q == S_CHAN);
    fold     = f_q;
    chan     = ch_q;
    se_valid = (state_q == S_CHAN);
    se_first = (state_q == S_CHAN) && first_q;
    fu_add   = 1'b0;
    fu_first = 1'b0;
    se_mod_n = '0;
    if (state_q == S_CHAN && first_q && mod_q != '0) begin
      fu_add   = 1'b1;
      fu_first = (mod_q == MI_W'(1));
      se_mod_n = NW'(MOD_CH[int'(mod_q) - 1]);
    end else if (state_q == S_FUSE_LAST) begin
      fu_add   = 1'b1;
      fu_first = (M == 1);
      se_mod_n = NW'(MOD_CH[M - 1]);
    end
    fu_write = (state_q == S_WRITE);
    te_shift = (state_q == S_TE_WAIT) && !am_busy;
    am_start = (state_q == S_AM_START) && te_filled;
  end

endmodule
