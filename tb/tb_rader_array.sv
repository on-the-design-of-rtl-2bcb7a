// tb_rader_array: self-checking test of the prime-length array driven with a
// boundary schedule built in the testbench: the default pipelined array
// (N=5, TA=2, TM=3) and an N=11 array with TA=3, TM=2.
module tb_rader_array;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int c0, f0, c1, f1;
  logic d0, d1;

  rader_array_harness #(.N(5),  .TA(2), .TM(3)) h0 (.clk, .rst_n, .checks(c0), .failures(f0), .done(d0));
  rader_array_harness #(.N(11), .TA(3), .TM(2)) h1 (.clk, .rst_n, .checks(c1), .failures(f1), .done(d1));

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (d0 && d1);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end
endmodule
