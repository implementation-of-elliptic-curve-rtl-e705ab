// tb_ecc_regfile: testbench of the main memory. Writes every word with random
// data, reads all words back on both ports and compares with a shadow copy,
// then checks that a write to one word leaves the others untouched.
module tb_ecc_regfile;
  import gf_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic we;
  logic [3:0] wa, ra, rb;
  fe_t wd, rda, rdb;
  fe_t shadow [16];

  ecc_regfile #(.W(RM), .DEPTH(16)) dut (.clk, .we, .wa, .wd, .ra, .rda, .rb, .rdb);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < 16; i++) begin
      ra = 4'(i);
      rb = 4'(15 - i);
      #1;
      checks += 2;
      if (rda !== shadow[i]) begin failures++; $display("port a word %0d wrong", i); end
      if (rdb !== shadow[15 - i]) begin failures++; $display("port b word %0d wrong", 15 - i); end
    end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra = 0; rb = 0;
    @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      we = 1; wa = 4'(i); wd = rand_fe(); shadow[i] = wd;
      @(negedge clk);
    end
    we = 0;
    check_all();
    for (int r = 0; r < 20; r++) begin
      @(negedge clk);
      we = 1; wa = 4'($urandom_range(0, 15)); wd = rand_fe(); shadow[wa] = wd;
      @(negedge clk);
      we = 0; wd = rand_fe();   // not written: we is low
      @(negedge clk);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
