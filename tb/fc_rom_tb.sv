// fc_rom_tb: loads random words through the programming port and reads them
// back, checking the one-clock read latency and that rd_en low holds the
// output.
`timescale 1ns/1ps
module fc_rom_tb;
  import fc_pkg::*;
  logic clk = 0, rd_en = 0, prog_we = 0;
  kaddr_t rd_addr = '0, prog_addr = '0;
  kword_t rd_data, prog_data = '0;
  kword_t shadow [256];
  kaddr_t addrs [256];
  int checks = 0, failures = 0;

  fc_rom dut (.clk, .rd_en, .rd_addr, .rd_data, .prog_we, .prog_addr, .prog_data);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      addrs[i]  = kaddr_t'(i * 128 + $urandom_range(0, 127));   // spread over 32K
      shadow[i] = kword_t'($urandom);
      @(negedge clk);
      prog_we = 1; prog_addr = addrs[i]; prog_data = shadow[i];
    end
    @(negedge clk) prog_we = 0;
    for (int i = 0; i < 256; i++) begin
      int j;
      j = $urandom_range(0, 255);
      @(negedge clk);
      rd_en = 1; rd_addr = addrs[j];
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_data !== shadow[j]) begin
        failures++;
        $display("FAIL: addr %h read %h expected %h", addrs[j], rd_data, shadow[j]);
      end
      rd_addr = addrs[(j + 1) % 256];
      @(negedge clk);
      checks++;
      if (rd_data !== shadow[j]) begin failures++; $display("FAIL: output changed with rd_en low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
