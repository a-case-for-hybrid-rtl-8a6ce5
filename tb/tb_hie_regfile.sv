// tb_hie_regfile: self-checking test of the 16-entry register file.
//
// Checks that all registers read zero after reset, then applies random writes
// and random reads on both ports against a shadow model, including writes to
// r0 (must stay zero) and reading a register in the cycle after its write.
module tb_hie_regfile;
  logic        clk = 0, rst_n = 0;
  logic [3:0]  ra1 = 0, ra2 = 0, wa = 0;
  logic [31:0] rd1, rd2, wd = 0;
  logic        we = 0;
  logic [31:0] model [16];
  int checks = 0, failures = 0;

  hie_regfile dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      ra1 = 4'(i); ra2 = 4'(15 - i); #1;
      check(rd1, 32'h0, $sformatf("reset value r%0d", i));
      check(rd2, 32'h0, $sformatf("reset value r%0d", 15 - i));
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      ra1 = 4'($urandom); ra2 = 4'($urandom); #1;
      check(rd1, model[ra1], $sformatf("port 1 r%0d", ra1));
      check(rd2, model[ra2], $sformatf("port 2 r%0d", ra2));
      we = ($urandom_range(0, 3) != 0);
      wa = 4'($urandom); wd = $urandom;
      if (n % 50 == 0) wa = 4'd0;
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
      #1 we = 0;
      ra1 = wa; #1;
      check(rd1, model[wa], $sformatf("read after write r%0d", wa));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
