// tb_efuse_reader: reading five e-fuse banks after reset.
// Five behavioural fuse banks hold known words. Checks that every word is
// read correctly, that done rises once the read is over, that the banks are
// no longer read after that, and that a second reset reads them again.
module tb_efuse_reader;
  localparam int NB = 5, B = 32;
  localparam logic [B-1:0] V [NB] = '{32'h5CA0_0001, 32'h0000_0008, 32'h0000_7D71,
                                       32'hDEAD_BEEF, 32'h8000_0001};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic fuse_rd, done;
  logic [4:0] fuse_addr;
  logic [NB-1:0] fuse_bit;
  logic [B-1:0] word [NB];
  int checks = 0, failures = 0;

  efuse_reader #(.NBANK(NB), .BITS(B)) dut (.clk, .rst_n, .fuse_rd, .fuse_addr, .fuse_bit, .word, .done);
  for (genvar g = 0; g < NB; g++) begin : g_b
    efuse_bank #(.BITS(B), .VALUE(V[g])) u (.rd(fuse_rd), .addr(fuse_addr), .q(fuse_bit[g]));
  end

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      int t, rd_after;
      t = 0; rd_after = 0;
      repeat (2) @(negedge clk); rst_n = 1;
      while (!done && t < 1000) begin @(negedge clk); t++; end
      chk(done, "done");
      chk(t >= B && t <= B + 4, $sformatf("pass %0d read took %0d clocks", pass, t));
      for (int b = 0; b < NB; b++) chk(word[b] == V[b], $sformatf("bank %0d = %h", b, word[b]));
      repeat (20) begin @(negedge clk); if (fuse_rd || fuse_bit != 0) rd_after++; end
      chk(rd_after == 0 && done, "banks idle and silent after the read");
      rst_n = 0;
      @(negedge clk);
      chk(!done && word[0] == 0, "reset clears");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
