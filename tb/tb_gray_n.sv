// tb_gray_n -- end-to-end testbench of the Gray counter at its default
// width (no parameter override).
//
// A reference model counts clock edges in binary, b, and converts the
// count to Gray code with g = b ^ (b >> 1); the reference auxiliary bit is
// ~b[0]. Every clock the testbench checks:
//   - the Gray word q[WIDTH:1] equals the reference;
//   - q[0] equals the reference auxiliary bit and is the even parity
//     flag of the Gray word (1 when the word holds an even number of ones);
//   - exactly one Gray bit changed since the previous clock.
// It runs several full cycles and counts the mechanisms of the design:
//   - the MSB wrap from 1,0,...,0 back to 0 (the OR gate path),
//   - a toggle of every Gray bit (each slice of the chain),
//   - an asynchronous reset in the middle of a count, checked to act
//     without a clock edge and to restart the sequence at 0.
// A mechanism that never happened counts as a failure. A watchdog ends
// the run if it hangs.
module tb_gray_n;

  localparam int unsigned W = 3;   // the counter's default width
  localparam int unsigned PERIOD = 1 << W;

  logic         async_rst, clock;
  logic [W:0]   q;
  logic [W-1:0] bin_ref, gray_ref, gray_prev;
  int           checks = 0;
  int           failures = 0;
  int           cycles = 0;
  int           wraps = 0;
  int           mid_resets = 0;
  int           bit_toggles [W];

  gray_n dut (.async_rst(async_rst), .clock(clock), .q(q));

  initial clock = 1'b0;
  always #5 clock = ~clock;
  always @(posedge clock) cycles++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t q=%b ref=%b)", what, $time, q, gray_ref);
    end
  endtask

  function automatic logic [W-1:0] to_gray(input logic [W-1:0] b);
    return b ^ (b >> 1);
  endfunction

  // Compare the counter with the reference after one clock edge.
  task automatic step_and_check();
    logic [W-1:0] diff;
    gray_prev = q[W:1];
    @(posedge clock);
    bin_ref++;
    gray_ref = to_gray(bin_ref);
    #1;
    check(q[W:1] == gray_ref, "Gray word matches reference");
    check(q[0] == ~bin_ref[0], "auxiliary bit follows binary bit 0");
    check(q[0] == ~(^q[W:1]), "auxiliary bit is even parity of Gray word");
    diff = q[W:1] ^ gray_prev;
    check($countones(diff) == 1, "exactly one Gray bit changes per clock");
    for (int i = 0; i < W; i++) if (diff[i]) bit_toggles[i]++;
    if (gray_prev == (W)'(1 << (W - 1)) && q[W:1] == '0) wraps++;
  endtask

  // Watchdog
  initial begin
    wait (cycles == 20 * PERIOD + 200);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) bit_toggles[i] = 0;
    async_rst = 1'b1;
    #1;
    check(q == {{W{1'b0}}, 1'b1}, "reset state: Gray 0, auxiliary bit 1");
    @(negedge clock);
    async_rst = 1'b0;
    bin_ref  = '0;
    gray_ref = '0;

    // Three full cycles and a bit.
    for (int n = 0; n < 3 * PERIOD + 3; n++) step_and_check();

    // Asynchronous reset in the middle of a clock period.
    @(negedge clock);
    check(q[W:1] != '0, "counter not at zero before mid-count reset");
    #2 async_rst = 1'b1;
    #1;
    check(q == {{W{1'b0}}, 1'b1}, "async reset acts without clock edge");
    mid_resets++;
    @(posedge clock); #1;
    check(q == {{W{1'b0}}, 1'b1}, "counter held while reset asserted");
    @(negedge clock);
    async_rst = 1'b0;
    bin_ref  = '0;
    gray_ref = '0;

    // Two more full cycles after the reset.
    for (int n = 0; n < 2 * PERIOD; n++) step_and_check();

    // Every mechanism must have happened.
    check(wraps >= 4, $sformatf("MSB wrap to zero seen %0d times", wraps));
    check(mid_resets >= 1, "mid-count asynchronous reset exercised");
    for (int i = 0; i < W; i++)
      check(bit_toggles[i] > 0, $sformatf("Gray bit %0d toggled %0d times", i + 1, bit_toggles[i]));
    $display("mechanisms: wraps=%0d mid_resets=%0d", wraps, mid_resets);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
