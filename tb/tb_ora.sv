// tb_ora: self-checking testbench of the ORA.
// Drives random compare inputs, clock enables, resets and carry inputs and
// checks the sticky pass flag and the carry-chain output against a reference.
module tb_ora;
  logic clk = 1'b0, rst, ce, a, b, cin, pass, cout;
  int checks = 0, failures = 0;
  logic ref_pass;

  ora dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mism;
    mism = 0;
    rst = 1'b1; ce = 1'b0; a = 1'b0; b = 1'b0; cin = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0;
    ref_pass = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      ce  = ($urandom_range(0, 3) != 0);
      a   = 1'($urandom);
      b   = ($urandom_range(0, 30) == 0) ? ~a : a;   // rare mismatches
      cin = 1'($urandom);
      rst = ($urandom_range(0, 99) == 0);
      #1;
      // carry output is combinational on the stored flag
      checks++;
      if (cout !== (ref_pass ? cin : 1'b1)) begin
        failures++; $display("cout mismatch at %0d", n);
      end
      @(posedge clk);
      if (rst) ref_pass = 1'b1;
      else if (ce && (a != b)) begin ref_pass = 1'b0; mism++; end
      #1;
      checks++;
      if (pass !== ref_pass) begin failures++; $display("pass mismatch at %0d", n); end
    end
    checks++;
    if (mism == 0) begin failures++; $display("no mismatch was exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
