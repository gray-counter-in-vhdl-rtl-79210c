// tb_gray_widths -- runs the Gray counter at the widths of the device
// implementation table: 9, 27, 34, 72, 103 and 170 bits.
//
// All six counters share one clock and reset. For each, a binary
// reference count b is converted with g = b ^ (b >> 1) and compared with
// the Gray word every clock, together with the auxiliary bit (~b[0]) and
// the one-bit-change rule. The 9-bit counter runs through more than two
// full cycles of 512 states, so its MSB wrap is checked; the wider ones
// can only be run through their low bits in simulation, which still
// exercises the full zin/zout chain of every slice above them (all of
// those slices must stay at 0 while their zin is 1 and their qin is 0).
// A watchdog ends the run if it hangs.
module tb_gray_widths;

  localparam int NW = 6;
  localparam int unsigned WIDTHS [NW] = '{9, 27, 34, 72, 103, 170};
  localparam int unsigned CYCLES = 1100;   // > 2 * 2**9

  logic async_rst, clock;
  int   cycles = 0;
  int   checks [NW];
  int   failures [NW];
  int   wraps9 = 0;
  logic running = 1'b0;

  initial clock = 1'b0;
  always #5 clock = ~clock;
  always @(posedge clock) cycles++;

  for (genvar k = 0; k < NW; k++) begin : g_w
    localparam int unsigned W = WIDTHS[k];
    logic [W:0]   q;
    logic [W-1:0] bin_ref, gray_prev;

    gray_n #(.WIDTH(W)) dut (.async_rst(async_rst), .clock(clock), .q(q));

    // Reset state: Gray word 0, auxiliary bit 1.
    initial begin
      checks[k] = 1;
      failures[k] = 0;
      #2;
      if (q != (W + 1)'(1)) begin
        failures[k]++;
        $display("FAIL width %0d: wrong reset state", W);
      end
    end

    always @(posedge clock) begin
      if (running) begin
        gray_prev = q[W:1];
        bin_ref = bin_ref + 1'b1;
        #1;
        checks[k] += 3;
        if (q[W:1] != (bin_ref ^ (bin_ref >> 1))) begin
          failures[k]++;
          $display("FAIL width %0d: Gray word wrong at count %0d", W, bin_ref);
        end
        if (q[0] != ~bin_ref[0]) begin
          failures[k]++;
          $display("FAIL width %0d: auxiliary bit wrong at count %0d", W, bin_ref);
        end
        if ($countones(q[W:1] ^ gray_prev) != 1) begin
          failures[k]++;
          $display("FAIL width %0d: not a single-bit change at count %0d", W, bin_ref);
        end
        if (W == 9 && q[W:1] == '0) wraps9++;
      end else begin
        bin_ref = '0;
      end
    end
  end

  // Watchdog
  initial begin
    wait (cycles == CYCLES + 100);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 1, 1);
    $finish;
  end

  initial begin
    int c, f;
    async_rst = 1'b1;
    #2;
    c = 0; f = 0;
    @(negedge clock);
    async_rst = 1'b0;
    running = 1'b1;
    repeat (CYCLES) @(negedge clock);
    for (int k = 0; k < NW; k++) begin
      c += checks[k];
      f += failures[k];
      $display("width %0d: checks=%0d failures=%0d", WIDTHS[k], checks[k], failures[k]);
    end
    c++;
    if (wraps9 < 2) begin
      f++;
      $display("FAIL 9-bit counter wrapped %0d times, expected 2", wraps9);
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

endmodule
