// tb_gray_1 -- self-checking testbench for the gray_1 one-bit slice.
//
// Walks every combination of stored bit, qin and zin many times in random
// order and checks, against a reference model kept in the testbench:
//   - zout equals zin & ~qin for every input pair (combinational);
//   - after a rising edge qout toggled exactly when qin & zin was 1;
//   - the asynchronous reset clears qout immediately, without a clock
//     edge, and holds it at 0 while asserted.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_gray_1;

  logic arst, clk, qin, zin;
  logic qout, zout;
  logic expect_q;
  int   checks = 0;
  int   failures = 0;
  int   cycles = 0;

  gray_1 dut (.arst(arst), .clk(clk), .qin(qin), .zin(zin), .qout(qout), .zout(zout));

  initial clk = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %0b want %0b (t=%0t)", what, got, want, $time);
    end
  endtask

  // Watchdog
  initial begin
    wait (cycles == 5000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    arst = 1'b1; qin = 1'b0; zin = 1'b0;
    #1;
    check(qout, 1'b0, "qout cleared by async reset");
    @(negedge clk);
    arst = 1'b0;
    expect_q = 1'b0;

    // Exhaustive combinational check of zout.
    for (int v = 0; v < 4; v++) begin
      {qin, zin} = v[1:0];
      #1;
      check(zout, zin & ~qin, $sformatf("zout qin=%0b zin=%0b", qin, zin));
    end
    qin = 1'b0; zin = 1'b0;   // no toggle request at the next edge

    // Random stimulus, one input pair per clock.
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      qin = 1'($urandom_range(0, 1));
      zin = 1'($urandom_range(0, 1));
      #1;
      check(zout, zin & ~qin, "zout");
      @(posedge clk);
      if (qin && zin) expect_q = ~expect_q;
      #1;
      check(qout, expect_q, $sformatf("qout after edge qin=%0b zin=%0b", qin, zin));
    end

    // Force the bit to 1, then check the reset acts without a clock edge.
    @(negedge clk);
    if (!qout) begin
      qin = 1'b1; zin = 1'b1;
      @(posedge clk); #1;
      check(qout, 1'b1, "qout set before async reset");
    end
    @(negedge clk);
    qin = 1'b1; zin = 1'b1;
    #2 arst = 1'b1;
    #1 check(qout, 1'b0, "async reset clears without clock edge");
    @(posedge clk); #1;
    check(qout, 1'b0, "qout held at 0 during reset despite toggle request");
    @(negedge clk);
    arst = 1'b0;
    @(posedge clk); #1;
    check(qout, 1'b1, "toggle resumes after reset release");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
