// addr_converter_sizes_tb: the converter across square array sizes K x K.
//
// The mapper is specialised to one array size, so each size is its own
// instance. Sizes run from 10 x 10 to 500 x 500 and cover H mod n = 0, 1, 2
// and 3 (n = 4, m = 8, 32-word memory rows). The memory row count P is the
// smallest power of two whose P x 32 words hold the array, which sets the
// address width (13 bits up to 18 bits for 500 x 500). Every index pair of
// every array is applied; each address is compared with the unsimplified
// tiled equation (or W*y + x in the leftover rows), checked to be below
// K*K and checked to be used only once.
module addr_converter_sizes_tb
  import tile_map_pkg::*;
;

  localparam int NK = 6;
  localparam int KS [NK] = '{10, 64, 75, 127, 255, 500};
  localparam int PS [NK] = '{256, 128, 256, 512, 2048, 8192};

  int checks = 0;
  int failures = 0;
  int n_r2 = 0;
  bit [NK-1:0] done = '0;

  function automatic int ref_addr(int w, int h, int xi, int yi);
    int hp;
    hp = h - (h % 4);
    if (yi < hp)
      return (yi - yi % 4) * w + (xi - xi % 8) * 4 + (xi % 8) * 4 + yi % 4;
    else
      return w * yi + xi;
  endfunction

  for (genvar g = 0; g < NK; g++) begin : g_size
    localparam int K  = KS[g];
    localparam int PP = PS[g];
    localparam int XW = $clog2(K);
    localparam int AW = $clog2(PP * 32);

    logic [XW-1:0] x, y;
    logic [AW-1:0] a;
    region_e       r;
    bit            seen [PP * 32];

    addr_converter #(.W(K), .H(K), .P(PP)) dut (.x(x), .y(y), .addr(a), .region(r));

    initial begin
      int bad;
      bad = 0;
      for (int yi = 0; yi < K; yi++) begin
        for (int xi = 0; xi < K; xi++) begin
          int expected;
          x = XW'(xi);
          y = XW'(yi);
          #1;
          expected = ref_addr(K, K, xi, yi);
          if (r == REGION_ROW_MAJOR) n_r2++;
          checks++;
          if (int'(a) != expected || int'(a) >= K * K || seen[a]) begin
            failures++;
            bad++;
            if (bad < 4) $display("FAIL %0dx%0d (x=%0d,y=%0d): addr %0d expected %0d", K, K, xi, yi, a, expected);
          end
          if (int'(a) < K * K) seen[a] = 1'b1;
        end
      end
      $display("%0d x %0d: %0d addresses, %0d mismatches", K, K, K * K, bad);
      done[g] = 1'b1;
    end
  end

  initial begin
    wait (&done);
    checks++;
    if (n_r2 == 0) begin
      failures++;
      $display("FAIL no row-major region exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
