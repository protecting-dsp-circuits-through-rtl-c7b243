// tb_key_fsm -- drives the key FSM with the right key (with gaps between words), with
// a key wrong in each word position in turn, and with extra words after the decision;
// checks the unlocked / locked outputs after every word.
module tb_key_fsm;
  localparam logic [31:0] SECRET = 32'hA5C3_1E7B;
  logic clk = 0, rst_n = 0, key_valid = 0;
  logic [7:0] key_word = 0;
  logic unlocked, locked;
  int checks = 0, failures = 0;

  key_fsm dut (.clk, .rst_n, .key_valid, .key_word, .unlocked, .locked);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp_u, input logic exp_l, input string what);
    #1; checks++;
    if (unlocked !== exp_u || locked !== exp_l) begin
      failures++;
      $display("%s: unlocked=%0b locked=%0b, expected %0b %0b", what, unlocked, locked, exp_u, exp_l);
    end
  endtask

  task automatic do_reset();
    rst_n <= 0; key_valid <= 0;
    repeat (2) @(posedge clk);
    rst_n <= 1; @(posedge clk);
    check(0, 0, "after reset");
  endtask

  task automatic send(input logic [7:0] w, input int gap);
    repeat (gap) begin key_valid <= 0; key_word <= 8'($urandom); @(posedge clk); end
    key_valid <= 1; key_word <= w; @(posedge clk); key_valid <= 0;
  endtask

  initial begin
    // right key, words separated by idle cycles carrying garbage
    do_reset();
    for (int k = 0; k < 4; k++) begin
      send(SECRET[31-8*k -: 8], k);
      check(k == 3, 0, "right key");
    end
    send(8'h00, 0); check(1, 0, "word after unlock ignored");

    // one wrong word in each position
    for (int bad = 0; bad < 4; bad++) begin
      do_reset();
      for (int k = 0; k < 4; k++) begin
        send(k == bad ? SECRET[31-8*k -: 8] ^ 8'h10 : SECRET[31-8*k -: 8], 0);
        check(0, k >= bad, "wrong key");
      end
      // the right key afterwards does not help
      for (int k = 0; k < 4; k++) send(SECRET[31-8*k -: 8], 0);
      check(0, 1, "stays locked");
    end

    // no key at all: neither state
    do_reset();
    repeat (20) @(posedge clk);
    check(0, 0, "no key");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
