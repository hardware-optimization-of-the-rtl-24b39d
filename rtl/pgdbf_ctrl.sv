// pgdbf_ctrl: control unit of the PGDBF decoder.
//
// Sequence of one codeword (one clock cycle per decoding iteration):
//   IDLE   ready = 1; start loads the channel word into the VNs (load).
//   FIRST  (IVRG only) the CNs of the received word are evaluated and their
//          complements are stored into R' (ivrg_load). A zero syndrome ends
//          decoding with 0 iterations. With LFSR initialisation R' is
//          already filled, so decoding goes from IDLE straight to ITER.
//   ITER   each cycle is one iteration: if the syndrome is zero the word is
//          a codeword (success); if K_MAX iterations were done decoding
//          stops (failure); otherwise the VNs flip (upd_en) and R' shifts
//          cyclically (rotate). During the first GDBF_ITERS iterations all
//          random bits are forced to 1 (force_ones), i.e. plain GDBF.
//   DONE   done = 1 for one cycle; success and iterations stay valid until
//          the next start. A new start is already accepted here (ready = 1).
// With LFSR initialisation, after reset the unit first spends S cycles in
// PBINIT shifting S LFSR bits into R' (lfsr_en); R' is not reloaded per word.
// Latency from start to done: IVRG iterations + 3 cycles (2 when the
// received word already satisfies every check), LFSR iterations + 2 cycles.
// The termination rule, K and the GDBF-first option follow the described
// decoder; the state sequence, the extra FIRST cycle and the one-time LFSR
// fill are this design's choices. A start while ready = 0 is ignored.
// The IVRG FIRST cycle follows the described IVRG initialisation, which
// stores R' at the first iteration before decoding proceeds.
module pgdbf_ctrl
  import pgdbf_pkg::*;
#(
  parameter init_e       INIT       = INIT_IVRG,
  parameter int unsigned S          = 4 * Z_DEF,  // length of R'
  parameter int unsigned K_MAX      = 300,        // maximum iterations K
  parameter int unsigned GDBF_ITERS = 0,          // leading GDBF iterations
  localparam int unsigned IW        = $clog2(K_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          syndrome_zero,
  output logic          ready,
  output logic          load,
  output logic          ivrg_load,
  output logic          lfsr_en,
  output logic          upd_en,
  output logic          rotate,
  output logic          force_ones,
  output logic          done,
  output logic          success,
  output logic [IW-1:0] iterations
);

  typedef enum logic [2:0] {
    ST_PBINIT, ST_IDLE, ST_FIRST, ST_ITER, ST_DONE
  } state_e;

  localparam int unsigned CW = $clog2(S + 1);

  state_e          state;
  logic [CW-1:0]   fill_cnt;
  logic            stop_ok, stop_fail;

  assign stop_ok   = syndrome_zero;
  assign stop_fail = (iterations == IW'(K_MAX));

  always_comb begin
    ready      = (state == ST_IDLE) || (state == ST_DONE);
    load       = ready && start;
    ivrg_load  = (state == ST_FIRST) && (INIT == INIT_IVRG);
    lfsr_en    = (state == ST_PBINIT);
    upd_en     = (state == ST_ITER) && !stop_ok && !stop_fail;
    rotate     = upd_en;
    force_ones = upd_en && (iterations < IW'(GDBF_ITERS));
    done       = (state == ST_DONE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= (INIT == INIT_LFSR) ? ST_PBINIT : ST_IDLE;
      fill_cnt   <= '0;
      iterations <= '0;
      success    <= 1'b0;
    end else begin
      unique case (state)
        ST_PBINIT: begin
          fill_cnt <= fill_cnt + 1'b1;
          if (fill_cnt == CW'(S - 1)) state <= ST_IDLE;
        end
        ST_IDLE, ST_DONE: begin
          if (start) begin
            iterations <= '0;
            success    <= 1'b0;
            state      <= (INIT == INIT_IVRG) ? ST_FIRST : ST_ITER;
          end else begin
            state      <= ST_IDLE;
          end
        end
        ST_FIRST: begin
          if (stop_ok) begin
            success <= 1'b1;
            state   <= ST_DONE;
          end else begin
            state   <= ST_ITER;
          end
        end
        ST_ITER: begin
          if (stop_ok) begin
            success <= 1'b1;
            state   <= ST_DONE;
          end else if (stop_fail) begin
            state   <= ST_DONE;
          end else begin
            iterations <= iterations + 1'b1;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // The VNs are never loaded and updated in the same cycle, the iteration
  // count never passes K, and done lasts exactly one cycle.
  a_no_load_in_iter: assert property (@(posedge clk) disable iff (!rst_n) !(load && upd_en));
  a_k_bound:         assert property (@(posedge clk) disable iff (!rst_n) iterations <= IW'(K_MAX));
  a_done_pulse:      assert property (@(posedge clk) disable iff (!rst_n) done && !start |=> !done);

endmodule
