// tensor_sram_macro_tb: byte-enabled row writes, row reads and DCIM reads
// (stored bits AND input vector) against a reference array.
module tensor_sram_macro_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en, we, dcim;
  logic [7:0] row;
  logic [255:0] wdata, in_vec, rdata;
  logic [31:0] wbe;
  tensor_sram_macro dut (.*);
  logic [255:0] refm [256];
  int checks = 0, failures = 0;
  function automatic logic [255:0] rnd();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    en = 0; we = 0; dcim = 0; row = 0; wdata = 0; in_vec = 0; wbe = 0;
    for (int r = 0; r < 256; r++) begin
      refm[r] = rnd();
      @(negedge clk); en = 1; we = 1; row = 8'(r); wdata = refm[r]; wbe = '1;
    end
    for (int t = 0; t < 200; t++) begin
      logic [255:0] d; logic [31:0] be; int r;
      r = $urandom_range(0, 255); d = rnd(); be = $urandom;
      @(negedge clk); en = 1; we = 1; row = 8'(r); wdata = d; wbe = be;
      for (int b = 0; b < 32; b++) if (be[b]) refm[r][8*b +: 8] = d[8*b +: 8];
    end
    for (int t = 0; t < 300; t++) begin
      int r; logic [255:0] iv; bit dc;
      r = $urandom_range(0, 255); iv = rnd(); dc = t[0];
      @(negedge clk); en = 1; we = 0; dcim = dc; row = 8'(r); in_vec = iv;
      @(negedge clk); en = 0;
      checks++;
      if (rdata !== (dc ? (refm[r] & iv) : refm[r])) begin failures++; $display("FAIL row %0d dcim %0d", r, dc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
