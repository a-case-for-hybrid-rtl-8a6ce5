// tb_hie_code_mem: self-checking test of the code memory.
//
// Writes random words (some with partial byte enables) to random addresses of
// a shadow model, then reads them back and checks the data one cycle after the
// read request, and that rd_data holds its value while rd_en is low.
module tb_hie_code_mem;
  localparam int unsigned BYTES = 1024;
  localparam int unsigned WORDS = BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic          clk = 0;
  logic          rd_en = 0, wr_en = 0;
  logic [AW-1:0] rd_addr = '0, wr_addr = '0;
  logic [3:0]    wr_be = '0;
  logic [31:0]   wr_data = '0, rd_data;
  logic [31:0]   model [WORDS];
  int checks = 0, failures = 0;

  hie_code_mem #(.BYTES(BYTES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word once so the model is fully known
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_be = 4'hF; wr_data = $urandom;
      model[a] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    // random partial writes
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'($urandom_range(0, WORDS - 1));
      wr_be = 4'($urandom); wr_data = $urandom;
      for (int b = 0; b < 4; b++)
        if (wr_be[b]) model[wr_addr][8*b +: 8] = wr_data[8*b +: 8];
    end
    @(negedge clk) wr_en = 0;
    // read back: data appears after the next rising edge
    for (int n = 0; n < 600; n++) begin
      logic [AW-1:0] a;
      a = AW'($urandom_range(0, WORDS - 1));
      @(negedge clk); rd_en = 1; rd_addr = a;
      @(negedge clk); rd_en = 0; rd_addr = ~a;
      checks++;
      if (rd_data !== model[a]) begin
        failures++;
        $display("FAIL read %0d: got %h expected %h", a, rd_data, model[a]);
      end
      @(negedge clk);
      checks++;
      if (rd_data !== model[a]) begin
        failures++;
        $display("FAIL hold %0d: got %h expected %h", a, rd_data, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
