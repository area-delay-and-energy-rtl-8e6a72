// tb_r_line_buffer: writes several "strips" of DEPTH columns into the buffer and
// checks that every column reads back the value written one strip earlier, that
// zero masks the read, that en low neither writes nor disturbs, and that reading
// happens before the same-cycle write.
module tb_r_line_buffer;
  localparam int DEPTH = 8;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0, en = 0, zero = 0;
  logic [AW-1:0] addr = '0;
  logic signed [11:0] wdata = '0, rdata;

  r_line_buffer #(.DEPTH(DEPTH)) dut (.clk, .en, .addr, .zero, .wdata, .rdata);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int model [DEPTH];

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 6; s++) begin
      for (int c = 0; c < DEPTH; c++) begin
        @(negedge clk);
        addr = AW'(c);
        zero = (s == 0);
        wdata = 12'($urandom);
        en = ($urandom_range(0, 3) != 0) || s == 0;
        #1;
        checks++;
        if (int'(rdata) != (zero ? 0 : model[c])) begin
          failures++;
          if (failures < 10) $display("FAIL s=%0d c=%0d rdata=%0d exp=%0d", s, c, rdata, zero ? 0 : model[c]);
        end
        if (en) model[c] = int'(wdata);
        @(posedge clk);
        #1;
        // after the edge the stored value is visible (read-after-write next cycle)
        if (!zero) begin
          checks++;
          if (int'(rdata) != model[c]) begin
            failures++;
            if (failures < 10) $display("FAIL post-write s=%0d c=%0d", s, c);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
