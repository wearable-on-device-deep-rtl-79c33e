// pool_case: drives one maxpool2x2 instance of the given size with NMAPS
// random maps (random input gaps and output back-pressure), compares each
// pooled pixel with the reference and reports its check and failure
// counts when done rises.
module pool_case
  import gr_pkg::*;
  import gr_ref_pkg::*;
#(
  parameter int H = 50, parameter int W = 12, parameter int C = 4,
  parameter int OH = 25, parameter int OW = 6, parameter int NMAPS = 2
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  logic iv = 0, ir, ov, ordy = 0;
  data_t [C-1:0] id = '0;
  data_t [C-1:0] od;

  maxpool2x2 #(.H(H), .W(W), .C(C), .OH(OH), .OW(OW)) dut (
    .clk, .rst_n, .in_valid(iv), .in_ready(ir), .in_data(id),
    .out_valid(ov), .out_ready(ordy), .out_data(od));

  initial begin
    iq_t x, r;
    checks = 0; failures = 0; done = 0;
    @(posedge rst_n);
    @(posedge clk);
    for (int m = 0; m < NMAPS; m++) begin
      x = {};
      for (int i = 0; i < H * W * C; i++) x.push_back(int'($urandom_range(0, 60000)) - 30000);
      r = pool(x, H, W, C, OH, OW);
      fork
        begin
          for (int p = 0; p < H * W; p++) begin
            while ($urandom_range(0, 3) == 0) begin iv <= 0; @(posedge clk); end
            iv <= 1;
            for (int c = 0; c < C; c++) id[c] <= data_t'(x[p * C + c]);
            do @(posedge clk); while (!ir);
          end
          iv <= 0;
        end
        begin
          for (int p = 0; p < OH * OW; p++) begin
            do begin
              ordy <= ($urandom_range(0, 2) != 0);
              @(posedge clk);
            end while (!(ov && ordy));
            for (int c = 0; c < C; c++) begin
              checks++;
              if (int'(od[c]) != r[p * C + c]) begin
                failures++;
                if (failures < 5)
                  $display("FAIL pool %0dx%0d pix %0d ch %0d got %0d want %0d", H, W, p, c, od[c], r[p * C + c]);
              end
            end
          end
          ordy <= 0;
        end
      join
      // no extra output after the map
      repeat (4) @(posedge clk);
      checks++;
      if (ov) failures++;
    end
    done = 1;
  end
endmodule
