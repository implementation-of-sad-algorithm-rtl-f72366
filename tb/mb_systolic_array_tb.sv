// mb_systolic_array_tb: loads a random 16x16 block with random rows above and
// below, then checks the 4 x 18 window at each of the 8 positions against a
// model of the padded frame (side columns repeat the edge pixels), and the
// unshifted block output right after loading.
module mb_systolic_array_tb;
  import sad_pkg::*;

  localparam int N = 16;
  localparam int STEP = 2;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift = 1'b0;
  always #5 clk = ~clk;
  pixel_t mb [N*N];
  pixel_t pad_top [N];
  pixel_t pad_bot [N];
  pixel_t win [STEP+2][N+2];
  pixel_t mb_rows [N*N];

  mb_systolic_array #(.N(N), .STEP(STEP)) dut (.clk, .rst_n, .load, .shift, .mb,
                                               .pad_top, .pad_bot, .win, .mb_rows);

  int checks = 0, failures = 0;

  function automatic int model(input int r, input int c);
    int cc = c < 1 ? 0 : c > N ? N - 1 : c - 1;
    if (r == 0) return int'(pad_top[cc]);
    if (r == N + 1) return int'(pad_bot[cc]);
    return int'(mb[(r - 1) * N + cc]);
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3; t++) begin
      for (int k = 0; k < N*N; k++) mb[k] = pixel_t'($urandom);
      for (int k = 0; k < N; k++) begin pad_top[k] = pixel_t'($urandom); pad_bot[k] = pixel_t'($urandom); end
      load = 1'b1; @(negedge clk); load = 1'b0;
      for (int k = 0; k < N*N; k++) begin
        checks++;
        if (mb_rows[k] != mb[k]) begin failures++; $display("FAIL mb_rows[%0d]", k); end
      end
      for (int s = 0; s < N / STEP; s++) begin
        for (int r = 0; r < STEP + 2; r++)
          for (int c = 0; c < N + 2; c++) begin
            checks++;
            if (int'(win[r][c]) != model(STEP * s + r, c)) begin
              failures++;
              $display("FAIL position %0d window (%0d,%0d) = %0d expected %0d", s, r, c, win[r][c], model(STEP * s + r, c));
            end
          end
        shift = 1'b1; @(negedge clk); shift = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
