// tb_maxpool2x2: the three pooling layers of the CNN at their real sizes:
// P1 50x12x4 -> 25x6, P2 25x6x6 -> 12x3 (odd row dropped) and
// P3 12x3x6 -> 6x2 (odd column kept), each on two random maps.
module tb_maxpool2x2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int c1, f1, c2, f2, c3, f3;
  logic d1, d2, d3;

  pool_case #(.H(50), .W(12), .C(4), .OH(25), .OW(6)) u_p1 (.clk, .rst_n, .checks(c1), .failures(f1), .done(d1));
  pool_case #(.H(25), .W(6),  .C(6), .OH(12), .OW(3)) u_p2 (.clk, .rst_n, .checks(c2), .failures(f2), .done(d2));
  pool_case #(.H(12), .W(3),  .C(6), .OH(6),  .OW(2)) u_p3 (.clk, .rst_n, .checks(c3), .failures(f3), .done(d3));

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c3, f1 + f2 + f3 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d1 && d2 && d3);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c3, f1 + f2 + f3);
    $finish;
  end
endmodule
