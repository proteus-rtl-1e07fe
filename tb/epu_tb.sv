// epu_tb: FP8 and FP16 rows with random exponents. Checks the running Emax
// over several rows (subnormals count as exponent 1) and, after latching a
// row, each lane's shift G-(Emax-Esum) and its underflow flag.
module epu_tb;
  import proteus_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  fmt_e fmt;
  logic [255:0] b_raw;
  logic [31:0][4:0] a_exp, shift;
  logic [31:0] lane_mask, uf;
  logic clr, upd_max, latch;
  logic [6:0] emax;
  epu dut (.*);
  int checks = 0, failures = 0;
  int rows_e [4][32];
  logic [255:0] rows_b [4];
  logic [31:0][4:0] rows_a [4];
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    clr = 0; upd_max = 0; latch = 0; lane_mask = '1; b_raw = '0; a_exp = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      int mx;
      fmt = f ? FMT_FP16 : FMT_FP8;
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      mx = 0;
      for (int r = 0; r < 4; r++) begin
        for (int j = 0; j < 32; j++) begin
          int ea, eb;
          rows_b[r][8*j +: 8] = 8'($urandom);
          ea = f ? $urandom_range(0, 31) : $urandom_range(0, 15);
          rows_a[r][j] = 5'(ea);
        end
        for (int j = 0; j < 32; j++) begin
          int ea, eb;
          ea = rows_a[r][j] == 0 ? 1 : rows_a[r][j];
          eb = f ? rows_b[r][8*(j/2*2)+10 +: 5] : rows_b[r][8*j+3 +: 4];
          if (eb == 0) eb = 1;
          rows_e[r][j] = ea + eb;
          if ((f == 0 || j % 2 == 0) && ea + eb > mx) mx = ea + eb;
        end
        @(negedge clk); b_raw = rows_b[r]; a_exp = rows_a[r]; upd_max = 1;
      end
      @(negedge clk); upd_max = 0;
      checks++; if (emax != 7'(mx)) begin failures++; $display("FAIL emax %0d exp %0d", emax, mx); end
      for (int r = 0; r < 4; r++) begin
        @(negedge clk); b_raw = rows_b[r]; a_exp = rows_a[r]; latch = 1;
        @(negedge clk); latch = 0;
        for (int j = 0; j < 32; j++) begin
          int d; bit u;
          if (f == 1 && j % 2 == 1) continue;
          d = mx - rows_e[r][j];
          u = d > ALIGN_G;
          checks++;
          if (uf[j] !== u || (!u && shift[j] != 5'(ALIGN_G - d))) begin
            failures++; $display("FAIL f%0d r%0d j%0d", f, r, j);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
