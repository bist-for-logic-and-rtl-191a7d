// bist_session_ctrl: sequencer of one PLB BIST test session.
//
// A session starts with a full configuration, which also initialises the
// ORA flags: ora_clr comes with the first configuration load. Then each of
// the N_CFG BIST configurations is applied in turn:
// a one-cycle cfg_load (the partial reconfiguration of the BUTs, cfg_idx
// names the configuration) together with tpg_init (the accumulators restart
// at 0), followed by PATTERNS clocks of test patterns and FLUSH clocks that
// let the last patterns pass the BUT and ORA flip-flops. The ORA flags are
// not cleared between configurations, so they are read once, after done
// rises, as in the source design's fastest method (one readback per session).
//
// Cycle count: done rises N_CFG x (1 + PATTERNS + FLUSH) clocks after the
// clock edge that samples start. With the defaults (12 configurations, 4,096
// patterns) that is 49,188.
// Configuration count and pattern count follow the source design; the
// handshake (start pulse, done level until the next start) and the flush
// cycles are this model's own.
module bist_session_ctrl #(
  parameter int unsigned N_CFG    = 12,
  parameter int unsigned PATTERNS = 4096,
  parameter int unsigned FLUSH    = 2,
  localparam int unsigned CW = $clog2(PATTERNS + FLUSH + 1),
  localparam int unsigned IW = (N_CFG > 1) ? $clog2(N_CFG) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output logic          ora_clr,
  output logic          cfg_load,
  output logic          tpg_init,
  output logic [IW-1:0] cfg_idx,
  output logic          running,
  output logic          done
);
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN} state_e;
  state_e        state;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      cnt     <= '0;
      cfg_idx <= '0;
      done    <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_LOAD;
          done    <= 1'b0;
          cfg_idx <= '0;
        end
        S_LOAD: begin
          state <= S_RUN;
          cnt   <= '0;
        end
        S_RUN: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(PATTERNS + FLUSH - 1)) begin
            if (cfg_idx == IW'(N_CFG - 1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              cfg_idx <= cfg_idx + 1'b1;
              state   <= S_LOAD;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ora_clr  = (state == S_LOAD) && (cfg_idx == '0);
  assign cfg_load = (state == S_LOAD);
  assign tpg_init = (state == S_LOAD);
  assign running  = (state != S_IDLE);
endmodule
