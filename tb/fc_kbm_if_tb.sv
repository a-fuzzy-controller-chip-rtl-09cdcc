// fc_kbm_if_tb: address formation and memory selection of the KBM interface.
// Random requests of each kind are checked against the address map computed
// here; the word returned on the ROM bus one clock later must come from the
// memory that was selected in the request clock.
`timescale 1ns/1ps
module fc_kbm_if_tb;
  import fc_pkg::*;
  logic clk = 0, rst_n = 0;
  kbm_req_e req = KBM_NONE;
  logic ext_sel = 0;
  logic [5:0] kb = '0;
  logic [1:0] kbd_word = '0;
  logic [7:0] in_idx = '0, in_val = '0, x = '0;
  kaddr_t sr_off = '0, imf_base = '0, sr_base = '0;
  logic [6:0] omf_page = '0;
  logic rom_en, ext_rd;
  kaddr_t rom_addr, ext_addr;
  kword_t rom_data, ext_data, bus;
  int checks = 0, failures = 0;

  fc_kbm_if dut (.*);

  // both memories return a function of the address, distinguishable
  always_ff @(posedge clk) begin
    if (rom_en) rom_data <= rom_addr ^ 15'h1234;
    if (ext_rd) ext_data <= ext_addr ^ 15'h4321;
  end

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      int exp_addr;
      bit e;
      @(negedge clk);
      kb = 6'($urandom); kbd_word = 2'($urandom); in_idx = 8'($urandom); in_val = 8'($urandom);
      x = 8'($urandom); sr_off = kaddr_t'($urandom); imf_base = kaddr_t'($urandom);
      sr_base = kaddr_t'($urandom); omf_page = 7'($urandom);
      e = 1'($urandom); ext_sel = e;
      case (i % 5)
        0: begin req = KBM_KBD; exp_addr = 4 * int'(kb) + int'(kbd_word); end
        1: begin req = KBM_IMF; exp_addr = (int'(imf_base) + 256 * int'(in_idx[1:0]) + int'(in_val)) % 32768; end
        3: begin req = KBM_DIR; exp_addr = (int'(imf_base) + int'(in_idx[7:2])) % 32768; end
        2: begin req = KBM_SR;  exp_addr = (int'(sr_base) + int'(sr_off)) % 32768; end
        default: begin req = KBM_OMF; exp_addr = 256 * int'(omf_page) + int'(x); end
      endcase
      #1;
      check(rom_en == !e && ext_rd == e, "memory select");
      check(int'(e ? ext_addr : rom_addr) == exp_addr,
            $sformatf("req %s: address %h expected %h", req.name(), e ? ext_addr : rom_addr, exp_addr));
      @(negedge clk);
      req = KBM_NONE;
      ext_sel = !e;    // the select may change; the returned word follows the request clock
      #1;
      check(int'(bus) == (exp_addr ^ (e ? 'h4321 : 'h1234)), $sformatf("ROM bus %h", bus));
      check(!rom_en && !ext_rd, "no read without request");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
