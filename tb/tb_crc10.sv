// tb_crc10: feeds random 48-byte payloads through the byte-serial CRC-10
// register (46 full bytes, then the six high bits of byte 46) and compares
// the result with a bitwise polynomial long division. Also checks clear and
// that the register holds when en is low.
module tb_crc10;
  import tb_pkg::*;
  logic       clk = 0, rst_n = 0, clear = 0, en = 0, six = 0;
  logic [7:0] data = 0;
  logic [9:0] crc, nxt;
  int checks = 0, failures = 0;

  crc10 dut (.clk, .rst_n, .clear, .en, .six, .data, .crc, .nxt);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] p [48];
    logic [9:0] expv, held;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 48; i++) p[i] = (t == 0) ? 8'h00 : 8'($urandom);
      if (t == 1) for (int i = 0; i < 48; i++) p[i] = 8'hFF;
      @(negedge clk); clear = 1; en = 0;
      @(negedge clk); clear = 0;
      for (int i = 0; i < 47; i++) begin
        en = 1; six = (i == 46); data = p[i];
        @(negedge clk);
        if ($urandom_range(0, 7) == 0) begin   // a gap: register must hold
          en = 0; held = crc; data = 8'($urandom);
          @(negedge clk);
          checks++;
          if (crc !== held) begin failures++; $display("FAIL crc changed with en low"); end
        end
      end
      en = 0; six = 0;
      expv = crc10_ref(p);
      checks++;
      if (crc !== expv) begin failures++; $display("FAIL payload %0d: crc %h expected %h", t, crc, expv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
