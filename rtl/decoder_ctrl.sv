// decoder_ctrl: layer, phase and iteration sequencer of the layered decoder.
//
// A layer of degree d is split into P = ceil(d/DC) phases of DC edges.  It
// takes 2*P cycles, numbered c = 0 .. 2P-1:
//   c = 0 .. P-1   search: the APP values of phase c are read, turned into
//                  VN->CN messages and fed to stage A of the CNUs (stage B of
//                  phase c-1 runs at the same time);
//   c = P          stage B of the last phase completes the minima, and phase
//                  P-1 is updated in the same cycle (APP and new messages);
//   c = P+1 .. 2P-1 phases 0 .. P-2 are read again and updated, one per cycle.
// A layer that fits the CNU (P = 1) thus takes 2 cycles and every extra phase
// adds 2 cycles, one for its search and one for its APP update.  Layers do not
// overlap.  An iteration visits layers 0 .. num_layers-1; decoding ends after
// an iteration whose stop check is clean (success) or after it_max
// iterations.  iters reports the number of iterations run.
//
// Handshake: start is sampled while idle (busy = 0); done is a one-cycle
// pulse at the end, with success and iters valid from then until the next
// start.  c2v_clr pulses with the accepted start.
module decoder_ctrl
  import ldpc_pkg::*;
#(
  parameter int DC     = 6,
  parameter int NLAYER = 42,
  parameter int ITW    = 5,
  parameter int LW     = $clog2(NLAYER),
  parameter int NPH    = (DCMAX + DC - 1) / DC,
  parameter int PHW    = (NPH > 1) ? $clog2(NPH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [LW:0]       num_layers,   // 1 .. NLAYER
  input  logic [ITW-1:0]    it_max,       // >= 1
  input  logic [DEGW-1:0]   deg,          // degree of the current layer
  input  logic              clean_now,
  output logic              busy,
  output logic              done,
  output logic              success,
  output logic [ITW-1:0]    iters,
  output logic              c2v_clr,
  output logic [LW-1:0]     layer,
  output logic              iter_first,
  output logic              a_valid,
  output logic              a_first,
  output logic              a_last,
  output logic [PHW-1:0]    r_phase,      // phase read this cycle
  output logic [DC-1:0]     r_mask,       // slots of that phase within the degree
  output logic              u_valid,
  output logic              u_last
);
  localparam int CW = $clog2(2 * NPH + 1);

  typedef enum logic [0:0] {S_IDLE, S_RUN} state_t;
  state_t        st;
  logic [CW-1:0] cyc;
  logic [ITW-1:0] it;
  int            nph;

  always_comb begin
    nph = (int'(deg) + DC - 1) / DC;
    if (nph < 1) nph = 1;
    a_valid    = (st == S_RUN) && (int'(cyc) < nph);
    a_first    = a_valid && (cyc == '0);
    a_last     = a_valid && (int'(cyc) == nph - 1);
    u_valid    = (st == S_RUN) && (int'(cyc) >= nph);
    u_last     = u_valid && (int'(cyc) == 2 * nph - 1);
    iter_first = (st == S_RUN) && (cyc == '0) && (layer == '0);
    if (int'(cyc) < nph)       r_phase = PHW'(cyc);
    else if (int'(cyc) == nph) r_phase = PHW'(nph - 1);
    else                       r_phase = PHW'(int'(cyc) - nph - 1);
    for (int s = 0; s < DC; s++)
      r_mask[s] = (st == S_RUN) && (int'(r_phase) * DC + s < int'(deg));
    busy    = (st == S_RUN);
    c2v_clr = (st == S_IDLE) && start;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      cyc     <= '0;
      layer   <= '0;
      it      <= '0;
      done    <= 1'b0;
      success <= 1'b0;
      iters   <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          st    <= S_RUN;
          cyc   <= '0;
          layer <= '0;
          it    <= '0;
        end
        S_RUN: begin
          if (!u_last) begin
            cyc <= cyc + 1'b1;
          end else begin
            cyc <= '0;
            if (int'(layer) != int'(num_layers) - 1) begin
              layer <= layer + 1'b1;
            end else begin
              layer <= '0;
              if (clean_now || (it + 1'b1 >= it_max)) begin
                st      <= S_IDLE;
                done    <= 1'b1;
                success <= clean_now;
                iters   <= it + 1'b1;
              end else begin
                it <= it + 1'b1;
              end
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
