// tb_flash_adc: checks the flash converter model against the closed-form
// rounding quantizer code = min(2^L-1, floor(v*(2^L-1)/FS + 1/2)), for the
// default 6-bit / 1000-cell converter and for a zero-error 4-bit / 15-cell
// converter, where every cell count must come out exactly.
module tb_flash_adc;
  import vmm_pkg::*;

  localparam int unsigned L = 6, FS = 1000;
  localparam int unsigned L2 = 4, FS2 = 15;

  vline_t vin, vin2;
  logic [L-1:0]  code;
  logic [L2-1:0] code2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  flash_adc #(.L(L), .FS_CELLS(FS))   dut  (.vin(vin),  .code(code));
  flash_adc #(.L(L2), .FS_CELLS(FS2)) dut2 (.vin(vin2), .code(code2));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned expect_code(longint unsigned v, int unsigned l,
                                                  int unsigned fs);
    longint unsigned lv, fsfx, c;
    lv   = (64'd1 << l) - 1;
    fsfx = longint'(fs) << FRAC_BITS;
    c    = (2 * v * lv + fsfx) / (2 * fsfx);
    return (c > lv) ? lv : c;
  endfunction

  task automatic check1(longint unsigned v);
    vin = vline_t'(v);
    #1;
    checks++;
    if (64'(code) != expect_code(v, L, FS)) begin
      failures++;
      $display("v=%0d code=%0d expected %0d", v, code, expect_code(v, L, FS));
    end
  endtask

  initial begin
    // Around every threshold of the 6-bit converter.
    for (int k = 1; k < (1 << L); k++) begin
      longint unsigned th;
      th = ((2 * longint'(k) - 1) * (longint'(FS) << FRAC_BITS) + 2 * ((1 << L) - 1) - 1)
           / (2 * ((1 << L) - 1));
      check1(th - 1);
      check1(th);
      check1(th + 1);
    end
    // Random, including over-range.
    for (int t = 0; t < 3000; t++)
      check1(longint'($urandom_range(0, 1200)) * 65536 + $urandom_range(0, 65535));
    check1(0);
    // Zero error: counts 0..15 with offsets below half a cell resolve exactly.
    for (int c = 0; c <= 15; c++)
      for (int t = 0; t < 20; t++) begin
        vin2 = (vline_t'(c) << FRAC_BITS) + vline_t'($urandom_range(0, 32767));
        #1;
        checks++;
        if (int'(code2) != c) begin
          failures++;
          $display("count %0d gave code %0d", c, code2);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
