// lwc_ctrl: load / run / output sequencer shared by the three cipher cores.
//
// A core takes its 128-bit key and 64-bit plaintext as four 32-bit load
// words (key word i on key_in, plaintext word i on data_in for i = 0, 1;
// least significant word first), accepted on each cycle with
// in_valid && in_ready. The cycle after the fourth word the sequencer runs
// for exactly RUN_CYCLES cycles (run = 1, run_cnt = 0 .. RUN_CYCLES-1), then
// presents the ciphertext for two cycles: out_lo (low word) and out_hi (high
// word), both with out_valid. There is no output back-pressure; a new load
// is accepted from the cycle after out_hi.
//
// The four-cycle 32-bit load follows the original architecture; the handshake,
// word order and reset are this implementation's choices.
module lwc_ctrl
  import lwc_pkg::*;
#(
  parameter int unsigned RUN_CYCLES = 44
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  output logic                          in_ready,
  output logic                          load_en,   // a load word is taken now
  output logic [1:0]                    load_idx,  // which word (0 = least significant)
  output logic                          run,       // one round step this cycle
  output logic [$clog2(RUN_CYCLES)-1:0] run_cnt,
  output logic                          out_valid,
  output logic                          out_hi     // 0: low word, 1: high word
);

  localparam int unsigned CW = $clog2(RUN_CYCLES);

  core_state_e state;
  logic [CW-1:0] cnt;
  logic [1:0]    widx;

  assign in_ready  = (state == ST_LOAD);
  assign load_en   = in_valid && in_ready;
  assign load_idx  = widx;
  assign run       = (state == ST_RUN);
  assign run_cnt   = cnt;
  assign out_valid = (state == ST_OUT_LO) || (state == ST_OUT_HI);
  assign out_hi    = (state == ST_OUT_HI);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_LOAD;
      cnt   <= '0;
      widx  <= '0;
    end else begin
      unique case (state)
        ST_LOAD: if (load_en) begin
          widx <= widx + 2'd1;
          if (widx == 2'(KEY_WORDS - 1)) begin
            state <= ST_RUN;
            cnt   <= '0;
          end
        end
        ST_RUN: begin
          if (cnt == CW'(RUN_CYCLES - 1)) state <= ST_OUT_LO;
          else                            cnt   <= cnt + 1'b1;
        end
        ST_OUT_LO: state <= ST_OUT_HI;
        ST_OUT_HI: begin
          state <= ST_LOAD;
          widx  <= '0;
        end
      endcase
    end
  end

  // The round counter never passes the last round.
  assert property (@(posedge clk) disable iff (!rst_n)
                   run |-> (cnt < CW'(RUN_CYCLES)));
  // Load words and ciphertext words never share a cycle.
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(load_en && out_valid));

endmodule
