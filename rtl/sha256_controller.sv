// sha256_controller: sequences the processing of one 512-bit block and keeps
// the round counter t that addresses the message scheduler, the word selection
// and the constant table.
//
// Cycle plan, counted in clock edges from the edge that samples start_i:
//   edge 0          IDLE : pad_ld_o, the padding block registers the block
//   edge 1          LOAD : wv_ld_o, A..H <= H0..H7
//   edges 2..65     ROUND: round_en_o, rounds t = 0..63, one W_t per round
//   edges 66, 67    FIN  : fin_en_o, H += A..H, half 0 then half 1
//   edge 68         OUT  : out_ld_o, digest register <= H; done_o rises
// done_o is a one-cycle pulse after edge 68, together with the new digest, so a
// block takes 69 cycles here and 70 from a host command. busy_o is high from
// the edge after start_i until done_o. start_i is ignored while busy. The
// schedule of one cycle for padding, 64 round cycles and two final-hash cycles
// follows the design's description; the load and output cycles fill its total
// of 70. All registers are clocked by clk with enables, no gated clocks.
module sha256_controller
  import sha256_pkg::*;
#(
  parameter int unsigned ROUNDS_P = ROUNDS
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   start_i,
  output logic   busy_o,
  output logic   pad_ld_o,
  output logic   wv_ld_o,
  output logic   round_en_o,
  output round_t t_o,
  output logic   fin_en_o,
  output logic   fin_half_o,
  output logic   out_ld_o,
  output logic   done_o
);
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_ROUND, S_FIN, S_OUT} state_e;
  state_e state, state_n;
  round_t t;
  logic   half;

  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE:  if (start_i) state_n = S_LOAD;
      S_LOAD:  state_n = S_ROUND;
      S_ROUND: if (t == round_t'(ROUNDS_P - 1)) state_n = S_FIN;
      S_FIN:   if (half) state_n = S_OUT;
      S_OUT:   state_n = S_IDLE;
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      t      <= '0;
      half   <= 1'b0;
      done_o <= 1'b0;
    end else begin
      state  <= state_n;
      done_o <= (state == S_OUT);
      if (state == S_ROUND) t <= t + 1'b1;
      else                  t <= '0;
      if (state == S_FIN)   half <= ~half;
      else                  half <= 1'b0;
    end
  end

  always_comb begin
    busy_o     = (state != S_IDLE);
    pad_ld_o   = (state == S_IDLE) && start_i;
    wv_ld_o    = (state == S_LOAD);
    round_en_o = (state == S_ROUND);
    fin_en_o   = (state == S_FIN);
    fin_half_o = half;
    out_ld_o   = (state == S_OUT);
    t_o        = t;
  end

  // done is a single pulse, given only once the controller is idle again
  a_done_pulse: assert property (@(posedge clk) disable iff (rst) done_o |=> !done_o);
  a_done_idle:  assert property (@(posedge clk) disable iff (rst) done_o |-> !busy_o);
endmodule
