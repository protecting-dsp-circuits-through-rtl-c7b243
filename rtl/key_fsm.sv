// key_fsm -- obfuscation FSM whose state is decided by the initialization key.
//
// After reset the FSM expects KEY_WORDS words of KEY_W bits, most significant word of
// SECRET first, one per cycle in which key_valid is high. Each right word moves it one
// state along the unlock path; the first wrong word sends it to LOCKED. After the
// last right word it enters UNLOCKED. Both end states hold until reset, and key words
// arriving after the decision are ignored. unlocked and locked are registered state
// bits. The secret, its length and the word-serial loading are this design's own
// choices; only the existence of a key-controlled FSM that enables the correct mode
// is given.
module key_fsm #(
  parameter int unsigned                   KEY_WORDS = 4,
  parameter int unsigned                   KEY_W     = 8,
  parameter logic [KEY_WORDS*KEY_W-1:0]    SECRET    = 32'hA5C3_1E7B
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             key_valid,
  input  logic [KEY_W-1:0] key_word,
  output logic             unlocked,
  output logic             locked
);
  typedef enum logic [1:0] {S_KEY, S_UNLOCKED, S_LOCKED} state_e;

  localparam int unsigned IDX_W = (KEY_WORDS > 1) ? $clog2(KEY_WORDS) : 1;

  state_e           state_q;
  logic [IDX_W-1:0] idx_q;
  logic [KEY_W-1:0] expect_word;

  assign expect_word = SECRET[(KEY_WORDS - 1 - int'(idx_q)) * KEY_W +: KEY_W];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_KEY;
      idx_q   <= '0;
    end else if (state_q == S_KEY && key_valid) begin
      if (key_word != expect_word)                   state_q <= S_LOCKED;
      else if (int'(idx_q) == int'(KEY_WORDS) - 1)   state_q <= S_UNLOCKED;
      else                                           idx_q   <= idx_q + 1'b1;
    end
  end

  assign unlocked = (state_q == S_UNLOCKED);
  assign locked   = (state_q == S_LOCKED);
endmodule
