// tb_fc_serial: feeds the FEM's fully connected layer (12 beats of 6
// channels = 72 inputs, 4 outputs) several random inputs with random
// gaps and compares the outputs with the reference, including the ReLU
// clamp; checks that out_valid pulses once per input set, 7 clocks after
// the last beat was accepted.
module tb_fc_serial;
  import gr_pkg::*;
  import gr_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic iv = 0, ir, ov;
  data_t [5:0] id = '0;
  data_t [3:0] od;
  int nvalid = 0, zeros = 0;

  fc_serial #(.NPIX(12), .C(6), .NOUT(4), .LAYER(4)) dut (
    .clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(id), .out_valid(ov), .out_data(od));

  always @(posedge clk) if (rst_n && ov) nvalid++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    iq_t x, r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int t = 0; t < 20; t++) begin
      int lat;
      x = {};
      for (int i = 0; i < 72; i++) x.push_back($urandom_range(0, (t % 2) ? 2000 : 30000));
      r = fc(x, 4, 4);
      for (int p = 0; p < 12; p++) begin
        while ($urandom_range(0, 2) == 0) begin iv <= 0; @(posedge clk); end
        iv <= 1;
        for (int c = 0; c < 6; c++) id[c] <= data_t'(x[p * 6 + c]);
        do @(posedge clk); while (!ir);
      end
      iv <= 0;
      lat = 0;
      while (!ov) begin @(posedge clk); lat++; end
      check(lat == 7, $sformatf("latency %0d", lat));
      for (int o = 0; o < 4; o++) begin
        check(int'(od[o]) == r[o], $sformatf("set %0d out %0d got %0d want %0d", t, o, od[o], r[o]));
        if (r[o] == 0) zeros++;
      end
      @(posedge clk);
    end
    check(nvalid == 20, $sformatf("out_valid count %0d", nvalid));
    check(zeros > 0, "ReLU clamp exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
