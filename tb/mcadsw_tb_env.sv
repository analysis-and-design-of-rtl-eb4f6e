// mcadsw_tb_env: test environment for the whole stereo engine.
//
// Behavioural model of the external memory on the engine's bus (fixed
// access latency LAT clocks, one access at a time), a synthetic stereo pair
// whose right view is the left view shifted by a known per-region disparity,
// and an independent reference model of the algorithm (mini-census,
// quantised Manhattan weights, two-pass aggregation, winner-takes-all) that
// predicts every depth byte.  It starts the engine, waits for 'done', then
// compares the whole depth map and reports the mechanisms it saw happen.
//
// The rules checked are those of the original architecture; image sizes,
// stimuli, bus timing and the reference model are this testbench's own.
// No ports: it prints "TB_RESULT checks=N failures=M" and finishes, and a
// Ports mirror the engine's, plus a probe of its request vector.
module mcadsw_tb_env
  import mcadsw_pkg::*;
#(
  parameter int W    = 36,
  parameter int H    = 6,
  parameter int DISP = 8,
  parameter int LAT  = 2,
  parameter int MAX_CYCLES = 2_000_000,
  parameter int PAUSE_EVERY = 997,    // memory unavailable (refresh, other
  parameter int PAUSE_LEN   = 400,    // bus masters) PAUSE_LEN of every PAUSE_EVERY clocks
  parameter int LAT_STEPS   = 1,      // frames run, latency LAT + s*LAT_INC in frame s
  parameter int LAT_INC     = 1
) (
  output logic              clk,
  output logic              rst_n,
  output logic              start,
  output logic [ADDR_W-1:0] base_ly, base_ry, base_lu, base_lv, base_depth,
  input  logic              busy,
  input  logic              done,
  input  logic              bus_req,
  input  logic              bus_we,
  input  logic [ADDR_W-1:0] bus_addr,
  input  logic [3:0]        bus_be,
  input  logic [BUS_W-1:0]  bus_wdata,
  output logic              bus_ack,
  output logic [BUS_W-1:0]  bus_rdata,
  input  logic              stall_wait,
  input  logic              stall_fifo,
  input  logic [N_REQ-1:0]  grant,
  input  logic [N_REQ-1:0]  req_probe      // the engine's internal bus requests
);
  localparam int WPR   = W / 4;
  localparam int PLANE = WPR * H;
  localparam int NSEG  = (W + 17) / 18;
  localparam int DW    = NSEG * 18;
  localparam int DWORDS = (DW * H + 3) / 4;
  localparam int MEMW  = 4 * PLANE + DWORDS;

  logic [31:0] mem [MEMW];
  byte unsigned ly [H][W], ry [H][W], lu [H][W], lv [H][W];
  int checks = 0, failures = 0;
  longint cycles = 0;
  int n_stall_wait = 0, n_stall_fifo = 0, n_gnt [N_REQ], n_contend = 0;
  int n_write = 0;

  initial clk = 0;
  always #5 clk = ~clk;

  assign base_ly = 0;
  assign base_ry = ADDR_W'(PLANE);
  assign base_lu = ADDR_W'(2 * PLANE);
  assign base_lv = ADDR_W'(3 * PLANE);
  assign base_depth = ADDR_W'(4 * PLANE);

  // ---------------- memory model ----------------
  int  lat_cnt;
  int  lat = LAT;                 // current access latency
  longint frame_cycles [LAT_STEPS];
  logic mbusy;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bus_ack <= 0; mbusy <= 0; lat_cnt <= 0; bus_rdata <= 0;
    end else if (bus_ack) begin
      bus_ack <= 0;
    end else if (!mbusy && bus_req && (cycles % PAUSE_EVERY) >= PAUSE_LEN) begin
      mbusy <= 1; lat_cnt <= lat - 1;
    end else if (mbusy) begin
      if (lat_cnt == 0) begin
        mbusy <= 0; bus_ack <= 1;
        if (bus_addr >= MEMW) begin
          failures++;
          $display("ERROR: bus address %0d out of range", bus_addr);
        end else if (bus_we) begin
          n_write++;
          for (int b = 0; b < 4; b++)
            if (bus_be[b]) mem[bus_addr][8*b +: 8] <= bus_wdata[8*b +: 8];
        end else
          bus_rdata <= mem[bus_addr];
      end else lat_cnt <= lat_cnt - 1;
    end
  end

  // ---------------- event counting ----------------
  always_ff @(posedge clk) if (rst_n) begin
    cycles++;
    if (stall_wait) n_stall_wait++;
    if (stall_fifo) n_stall_fifo++;
    for (int k = 0; k < N_REQ; k++) if (grant[k]) n_gnt[k]++;
    if (grant[N_REQ-1:1] != 0 && $countones(req_probe[N_REQ-1:1]) > 1) n_contend++;
  end

  // ---------------- reference model ----------------
  function automatic int pix(input int sel, input int x, input int y);
    if (x < 0 || x >= W || y < 0 || y >= H) return 0;
    case (sel)
      0: return ly[y][x];
      1: return ry[y][x];
      2: return lu[y][x];
      default: return lv[y][x];
    endcase
  endfunction

  function automatic int census(input int sel, input int x, input int y);
    int dx [6] = '{-2, 2, -2, 2, -2, 2};
    int dy [6] = '{-2, -2, 0, 0, 2, 2};
    int c, r;
    c = pix(sel, x, y);
    r = 0;
    for (int k = 0; k < 6; k++)
      if (!(pix(sel, x + dx[k], y + dy[k]) > c)) r |= (1 << k);
    return r;
  endfunction

  function automatic int wshift(input int x1, input int y1, input int x2, input int y2);
    int d;
    if (x2 < 0 || x2 >= W || y2 < 0 || y2 >= H) return -1;
    d = (ly[y1][x1] > ly[y2][x2] ? ly[y1][x1] - ly[y2][x2] : ly[y2][x2] - ly[y1][x1])
      + (lu[y1][x1] > lu[y2][x2] ? lu[y1][x1] - lu[y2][x2] : lu[y2][x2] - lu[y1][x1])
      + (lv[y1][x1] > lv[y2][x2] ? lv[y1][x1] - lv[y2][x2] : lv[y2][x2] - lv[y1][x1]);
    if (d == 0) return 6;
    if (d < 5) return 5;
    if (d < 10) return 4;
    if (d < 15) return 3;
    if (d < 20) return 2;
    if (d < 25) return 1;
    if (d < 30) return 0;
    return -1;                      // weight 0
  endfunction

  // census codes of every pixel, computed once (rows -15..H+14 padded)
  int cl [H+30][W], cr [H+30][W];
  longint vcost [W];

  task automatic build_census();
    for (int y = -15; y < H + 15; y++)
      for (int x = 0; x < W; x++) begin
        cl[y+15][x] = census(0, x, y);
        cr[y+15][x] = census(1, x, y);
      end
  endtask

  task automatic reference_row(input int y, output int dref [DW]);
    longint best [DW];
    int vsh [31][W];
    int hsh [31][W];
    for (int x = 0; x < W; x++)
      for (int j = -15; j <= 15; j++) begin
        vsh[j+15][x] = (j == 0) ? 6 : wshift(x, y, x, y + j);
        hsh[j+15][x] = (j == 0) ? 6 : wshift(x, y, x + j, y);
      end
    for (int x = 0; x < DW; x++) begin best[x] = -1; dref[x] = 0; end
    for (int d = 0; d < DISP; d++) begin
      for (int x = 0; x < W; x++) begin
        longint s;
        s = 0;
        for (int j = 0; j < 31; j++) begin
          int a, b;
          a = cl[y+j][x];
          b = (x - d >= 0) ? cr[y+j][x-d] : 0;
          if (vsh[j][x] >= 0) s += longint'($countones(a ^ b)) << vsh[j][x];
        end
        vcost[x] = s;
      end
      for (int x = 0; x < DW; x++) begin
        longint s;
        s = 0;
        if (x < W)
          for (int i = -15; i <= 15; i++)
            if (x + i >= 0 && x + i < W && hsh[i+15][x] >= 0)
              s += vcost[x + i] << hsh[i+15][x];
        if (best[x] < 0 || s < best[x]) begin best[x] = s; dref[x] = d; end
      end
    end
  endtask

  // ---------------- stimulus ----------------
  function automatic int true_disp(input int x, input int y);
    int d = (x < W / 2) ? DISP / 4 : DISP / 2;
    if (y >= H / 2 && x >= W / 4 && x < 3 * W / 4) d = DISP - 3;
    return d;
  endfunction

  initial begin
    for (int k = 0; k < N_REQ; k++) n_gnt[k] = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        ly[y][x] = 8'($urandom_range(0, 255));
        lu[y][x] = 8'(96 + $urandom_range(0, 63));
        lv[y][x] = 8'(96 + (x * 7 + y * 3) % 64);
      end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int xs;
        xs = x + true_disp(x, y);
        ry[y][x] = (xs < W) ? ly[y][xs] : 8'($urandom_range(0, 255));
      end
    build_census();
    for (int st = 0; st < LAT_STEPS; st++) begin
      longint t0;
      lat = LAT + st * LAT_INC;
      for (int a = 0; a < MEMW; a++) mem[a] = 32'hA5A5_A5A5;
      for (int y = 0; y < H; y++)
        for (int w = 0; w < WPR; w++)
          for (int b = 0; b < 4; b++) begin
            mem[y * WPR + w][8*b +: 8]             = ly[y][4*w+b];
            mem[PLANE + y * WPR + w][8*b +: 8]     = ry[y][4*w+b];
            mem[2 * PLANE + y * WPR + w][8*b +: 8] = lu[y][4*w+b];
            mem[3 * PLANE + y * WPR + w][8*b +: 8] = lv[y][4*w+b];
          end
      rst_n = 0; start = 0;
      repeat (3) @(posedge clk);
      rst_n = 1;
      @(posedge clk);
      start <= 1;
      @(posedge clk);
      start <= 0;
      t0 = cycles;
      wait (done);
      @(posedge clk);
      frame_cycles[st] = cycles - t0;
      $display("frame of %0dx%0d, %0d disparities, bus latency %0d: %0d cycles",
               W, H, DISP, lat, frame_cycles[st]);
      begin
        int dref [DW];
        int good;
        good = 0;
          for (int y = 0; y < H; y++) begin
          reference_row(y, dref);
          for (int x = 0; x < DW; x++) begin
            int a, got;
            a   = 4 * PLANE + (y * DW + x) / 4;
            got = mem[a][8 * ((y * DW + x) % 4) +: 8];
            checks++;
            if (got != dref[x] * 4) begin
              failures++;
              if (failures < 10)
                $display("ERROR depth(%0d,%0d) = %0d, expected %0d", x, y, got, dref[x] * 4);
            end
            if (x < W && dref[x] == true_disp(x, y)) good++;
          end
        end
        $display("reference matches the true disparity at %0d of %0d pixels", good, W * H);
      end
    end
    // a longer bus latency must cost cycles, never save them
    for (int st = 1; st < LAT_STEPS; st++) begin
      checks++;
      if (frame_cycles[st] <= frame_cycles[st-1]) begin
        failures++;
        $display("ERROR: latency %0d took %0d cycles, latency %0d took %0d", LAT + st * LAT_INC,
                 frame_cycles[st], LAT + (st - 1) * LAT_INC, frame_cycles[st-1]);
      end
    end
    // mechanisms
    checks++;
    if (n_stall_wait == 0) begin failures++; $display("ERROR: kernel never waited for input columns"); end
    checks++;
    if (n_gnt[0] != DW * H * LAT_STEPS) begin failures++; $display("ERROR: %0d depth grants, expected %0d", n_gnt[0], DW * H * LAT_STEPS); end
    checks++;
    if (n_stall_fifo == 0) begin failures++; $display("ERROR: depth FIFO never filled"); end
    checks++;
    if (n_contend == 0) begin failures++; $display("ERROR: round-robin never resolved contention"); end
    for (int k = 1; k < N_REQ; k++) begin
      checks++;
      if (n_gnt[k] == 0) begin failures++; $display("ERROR: requester %0d never granted", k); end
    end
    $display("events: contended round-robin grants=%0d", n_contend);
    $display("events: stall_wait=%0d stall_fifo=%0d grants=%0d/%0d/%0d/%0d/%0d/%0d writes=%0d",
             n_stall_wait, n_stall_fifo, n_gnt[0], n_gnt[1], n_gnt[2], n_gnt[3], n_gnt[4], n_gnt[5], n_write);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
