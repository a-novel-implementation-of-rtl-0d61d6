// tile_addr_mapper_top_tb: end-to-end test of the address generator at its
// default size (90 x 90 array, 8 x 4 tiles, 256 x 32 word memory).
//
// 'next' is driven with a random pattern (high about three cycles in four)
// for two complete passes over the array, then the generator is reset in
// mid-pass and run on. Every cycle the testbench compares
//   - x, y and last with its own raster-order index model,
//   - phys_addr with the unsimplified four-term tiled equation for rows
//     y < H' = 88 and with W*y + x for the two leftover rows,
//   - mem_row / mem_col with phys_addr / 32 and phys_addr mod 32,
//   - region_row_major with y >= H'.
// On each completed pass it checks that all 8100 addresses 0..8099 were
// produced exactly once. It counts how often each mechanism occurred:
// tiled conversion, row-major conversion, a step that crosses a tile row,
// a wrap to (0, 0), a hold cycle and a reset, and fails if any never did.
module tile_addr_mapper_top_tb;

  localparam int W = 90;
  localparam int H = 90;
  localparam int M = 8;
  localparam int N = 4;
  localparam int Q = 32;
  localparam int HP = H - (H % N);

  int checks = 0;
  int failures = 0;

  logic        clk = 1'b0;
  logic        reset;
  logic        next;
  logic [6:0]  x, y;
  logic        last;
  logic [12:0] phys_addr;
  logic [7:0]  mem_row;
  logic [4:0]  mem_col;
  logic        region_row_major;

  tile_addr_mapper_top dut (
    .clk(clk), .reset(reset), .next(next),
    .x(x), .y(y), .last(last),
    .phys_addr(phys_addr), .mem_row(mem_row), .mem_col(mem_col),
    .region_row_major(region_row_major)
  );

  always #5 clk = ~clk;

  int ex, ey;
  int n_tiled = 0, n_rowmaj = 0, n_tilerow = 0, n_wrap = 0, n_hold = 0, n_reset = 0;
  int n_pass_ok = 0;
  bit seen [8192];
  int seen_count = 0;
  bit pass_clean = 1'b0;   // true while the current pass started at (0,0) without a reset inside

  function automatic int ref_addr(int xi, int yi);
    if (yi < HP)
      return (yi - yi % N) * W + (xi - xi % M) * N + (xi % M) * N + yi % N;
    else
      return W * yi + xi;
  endfunction

  task automatic clear_seen();
    foreach (seen[i]) seen[i] = 1'b0;
    seen_count = 0;
  endtask

  task automatic check_now();
    int expected;
    expected = ref_addr(ex, ey);
    checks++;
    if (int'(x) != ex || int'(y) != ey || last != (ex == W - 1 && ey == H - 1)) begin
      failures++;
      if (failures < 10) $display("FAIL indices (%0d,%0d,%0b) expected (%0d,%0d)", x, y, last, ex, ey);
    end
    checks++;
    if (int'(phys_addr) != expected) begin
      failures++;
      if (failures < 10) $display("FAIL addr (%0d,%0d) = %0d expected %0d", ex, ey, phys_addr, expected);
    end
    checks++;
    if (int'(mem_row) != expected / Q || int'(mem_col) != expected % Q) begin
      failures++;
      if (failures < 10) $display("FAIL row/col %0d/%0d for %0d", mem_row, mem_col, expected);
    end
    checks++;
    if (region_row_major != (ey >= HP)) begin
      failures++;
      if (failures < 10) $display("FAIL region at y=%0d", ey);
    end
    if (region_row_major) n_rowmaj++; else n_tiled++;
  endtask

  task automatic step(input logic do_next, input logic do_reset);
    next  = do_next;
    reset = do_reset;
    // Record the address presented in this cycle before it is consumed.
    if (do_next && !do_reset && pass_clean && !seen[phys_addr]) begin
      seen[phys_addr] = 1'b1;
      seen_count++;
    end
    @(posedge clk);
    #1;
    if (do_reset) begin
      ex = 0; ey = 0;
      n_reset++;
      clear_seen();
      pass_clean = 1'b1;
    end else if (do_next) begin
      ex++;
      if (ex == W) begin
        ex = 0;
        ey++;
        if (ey % N == 0 && ey < H) n_tilerow++;
        if (ey == H) begin
          ey = 0;
          n_wrap++;
          checks++;
          if (pass_clean && seen_count != W * H) begin
            failures++;
            $display("FAIL pass produced %0d distinct addresses, expected %0d", seen_count, W * H);
          end else if (pass_clean) begin
            n_pass_ok++;
          end
          clear_seen();
        end
      end
    end else begin
      n_hold++;
    end
    check_now();
  endtask

  initial begin
    next = 1'b0;
    reset = 1'b1;
    ex = 0; ey = 0;
    clear_seen();
    step(1'b0, 1'b1);
    while (n_wrap < 2) step(1'($urandom % 4 != 0), 1'b0);
    for (int i = 0; i < 1234; i++) step(1'($urandom % 4 != 0), 1'b0);
    step(1'b1, 1'b1);
    while (n_wrap < 3) step(1'b1, 1'b0);
    $display("tiled=%0d row-major=%0d tile-row-steps=%0d wraps=%0d holds=%0d resets=%0d full-passes=%0d",
             n_tiled, n_rowmaj, n_tilerow, n_wrap, n_hold, n_reset, n_pass_ok);
    checks++;
    if (n_tiled == 0)   begin failures++; $display("FAIL no tiled conversion"); end
    checks++;
    if (n_rowmaj == 0)  begin failures++; $display("FAIL no row-major conversion"); end
    checks++;
    if (n_tilerow == 0) begin failures++; $display("FAIL no tile row crossing"); end
    checks++;
    if (n_wrap == 0)    begin failures++; $display("FAIL no wrap"); end
    checks++;
    if (n_hold == 0)    begin failures++; $display("FAIL no hold cycle"); end
    checks++;
    if (n_reset < 2)    begin failures++; $display("FAIL no reset in mid-pass"); end
    checks++;
    if (n_pass_ok < 3)  begin failures++; $display("FAIL only %0d complete passes checked", n_pass_ok); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
