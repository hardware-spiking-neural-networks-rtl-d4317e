// soma_mpcu: Membrane Potential Computing Unit of the soma.
//
// Holds the 8-bit membrane potential (MP), the two-state neuron machine
// (operational / refractory) and the time-frame counter. Per time-step strobe:
//   operational, some input (syn_sum or inhib non-zero):
//       MP <- clamp(MP + syn_sum - inhib, 0, 255)
//   operational, no input: MP moves by cfg.slope towards the resting potential
//       (down from above, up from below) and stops there
//   fire (from the comparator, MP_cand > THP): MP <- 0 (hyperpolarisation, below
//       rest) and the neuron becomes refractory
//   time-frame end (frame_len steps since the frame started, no spike): MP <- rest,
//       so only inputs that arrive within one frame add up to a spike
//   refractory: inputs are ignored, MP recovers by cfg.slope towards rest; when it
//       reaches rest the neuron is operational again
// mp_cand is the combinational candidate value given to the comparator; mp is the
// registered potential. The update itself follows the design; the exact frame
// behaviour, the refractory exit condition, clamping and the reset value (MP = 0,
// operational) are choices of this implementation. inhib is the optional global
// inhibitory potential (0 when inhibition is not used).
module soma_mpcu
  import snn_pkg::*;
#(
  parameter int SUM_BITS = 9
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                step,        // time-step strobe
  input  soma_cfg_t           cfg,
  input  logic [SUM_BITS-1:0] syn_sum,     // from SYNIN
  input  mp_t                 inhib,       // global inhibitory potential
  input  logic                fire,        // from the comparator
  output mp_t                 mp_cand,     // candidate MP for the comparator
  output mp_t                 mp,          // registered MP
  output logic                operational,
  output logic [7:0]          frame_cnt,
  output logic                frame_end    // this step closes a time frame
);

  nstate_e state_q;
  mp_t     mp_q;
  logic [7:0] fcnt_q;

  function automatic mp_t toward_rest(mp_t v, mp_t rest, mp_t slope);
    if (v > rest) return (v - rest > slope) ? v - slope : rest;
    else          return (rest - v > slope) ? v + slope : rest;
  endfunction

  always_comb begin
    logic signed [SUM_BITS+1:0] acc;
    acc = $signed({2'b00, SUM_BITS'(mp_q)}) + $signed({2'b00, syn_sum})
        - $signed({2'b00, SUM_BITS'(inhib)});
    if (state_q == ST_REFRACTORY)
      mp_cand = toward_rest(mp_q, cfg.rest, cfg.slope);
    else if (syn_sum != '0 || inhib != '0)
      mp_cand = (acc < 0) ? '0 : (acc > (SUM_BITS+2)'(MP_MAX)) ? MP_MAX : mp_t'(acc);
    else
      mp_cand = toward_rest(mp_q, cfg.rest, cfg.slope);
  end

  assign frame_end   = (state_q == ST_OPERATIONAL) && (cfg.frame_len != 8'd0)
                       && (fcnt_q == cfg.frame_len - 8'd1);
  assign operational = (state_q == ST_OPERATIONAL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_OPERATIONAL;
      mp_q    <= '0;
      fcnt_q  <= '0;
    end else if (step) begin
      unique case (state_q)
        ST_OPERATIONAL: begin
          if (fire) begin
            mp_q    <= '0;
            state_q <= ST_REFRACTORY;
            fcnt_q  <= '0;
          end else if (frame_end) begin
            mp_q   <= cfg.rest;
            fcnt_q <= '0;
          end else begin
            mp_q   <= mp_cand;
            fcnt_q <= (cfg.frame_len == 8'd0) ? 8'd0 : fcnt_q + 8'd1;
          end
        end
        ST_REFRACTORY: begin
          mp_q <= mp_cand;
          if (mp_cand >= cfg.rest) state_q <= ST_OPERATIONAL;
        end
        default: state_q <= ST_OPERATIONAL;
      endcase
    end
  end

  assign mp        = mp_q;
  assign frame_cnt = fcnt_q;

endmodule
