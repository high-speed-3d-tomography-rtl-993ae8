// tb_coef_table: the coefficient table at its default size (5 segments x 96
// angles). Random entries are written at random addresses, some of them
// twice, with random reads in between; each read must return the last value
// written at that address, and a write must only show after its clock edge.
// The coefficients are those of eq. (3); the table and its write port are
// this design's.
module tb_coef_table;
  import bp_pkg::*;
  localparam int NA = 480;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0;
  logic [$clog2(NA)-1:0] wr_addr = '0, rd_addr = '0;
  coef_t wr_data = '0, rd_data;

  coef_table #(.NA(NA)) dut (.*);

  int checks = 0, failures = 0;
  coef_t model [NA];

  function automatic coef_t rand_coef();
    return coef_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every entry once
    for (int a = 0; a < NA; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = $clog2(NA)'(a); wr_data = rand_coef();
      model[a] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    // random mix of overwrites and reads
    repeat (4000) begin
      @(negedge clk);
      rd_addr = $clog2(NA)'($urandom_range(0, NA - 1));
      wr_en = $urandom_range(0, 2) == 0;
      wr_addr = ($urandom_range(0, 3) == 0) ? rd_addr : $clog2(NA)'($urandom_range(0, NA - 1));
      wr_data = rand_coef();
      #1;
      checks++;
      if (rd_data !== model[rd_addr]) begin
        failures++;
        if (failures < 10) $display("read %0d differs before the write edge", rd_addr);
      end
      if (wr_en) model[wr_addr] = wr_data;
      @(posedge clk); #1;
      checks++;
      if (rd_data !== model[rd_addr]) begin
        failures++;
        if (failures < 10) $display("read %0d differs after the write edge", rd_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
