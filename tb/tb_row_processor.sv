// tb_row_processor: feeds several strips of random pixel rows (with random stall
// cycles) and checks u_h and u_l of every row and every column against the 1-D
// reference lifting of that row, which starts from zero at each strip row.
// Also checks that the row state survives a stall and restarts on first_col.
module tb_row_processor;
  import dwt_ref_pkg::*;
  localparam int M = 4;
  localparam int L = 12;        // column pairs per strip row
  localparam int STRIPS = 5;

  logic clk = 0, rst_n = 0, en = 0, first_col = 0;
  logic [7:0] x_odd [M], x_even [M];
  logic signed [11:0] u_h [M], u_l [M];

  row_processor #(.M(M)) dut (.clk, .rst_n, .en, .first_col, .x_odd, .x_even, .u_h, .u_l);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, stalls = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a [M][], b [M][], hi [M][], lo [M][];
    foreach (x_odd[m]) begin x_odd[m] = 0; x_even[m] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < STRIPS; s++) begin
      for (int m = 0; m < M; m++) begin
        a[m] = new[L]; b[m] = new[L];
        for (int k = 0; k < L; k++) begin
          a[m][k] = (s == STRIPS - 1) ? ((k + m) % 2) * 255 : $urandom_range(0, 255);
          b[m][k] = (s == STRIPS - 1) ? ((k + m + 1) % 2) * 255 : $urandom_range(0, 255);
        end
        lift1d(a[m], b[m], hi[m], lo[m]);
      end
      for (int k = 0; k < L; k++) begin
        // optional stall cycle with garbage on the inputs
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          en = 0; first_col = $urandom_range(0, 1);
          foreach (x_odd[m]) begin x_odd[m] = 8'($urandom); x_even[m] = 8'($urandom); end
          stalls++;
        end
        @(negedge clk);
        en = 1;
        first_col = (k == 0);
        for (int m = 0; m < M; m++) begin
          x_odd[m] = 8'(a[m][k]);
          x_even[m] = 8'(b[m][k]);
        end
        #1;
        for (int m = 0; m < M; m++) begin
          checks += 2;
          if (int'(u_h[m]) != hi[m][k] || int'(u_l[m]) != lo[m][k]) begin
            failures++;
            if (failures < 10)
              $display("FAIL s=%0d k=%0d m=%0d u_h=%0d/%0d u_l=%0d/%0d", s, k, m,
                       u_h[m], hi[m][k], u_l[m], lo[m][k]);
          end
        end
      end
    end
    @(negedge clk);
    en = 0;
    if (stalls == 0) begin failures++; $display("FAIL no stall exercised"); end
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
