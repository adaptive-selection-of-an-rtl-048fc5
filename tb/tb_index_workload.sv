// tb_index_workload: u-index against A-index on synthetic scenes, at
// 8 KB and 16 KB.
//
// Three scenes of textured triangles (1024x1024 textures) are rasterized here into spans, with
// texture coordinates advancing about one texel per pixel along a rotated
// direction: scene 0 keeps the span direction within 25 degrees of the u
// axis (u-major dominant), scene 1 within 25 degrees of the v axis (v-major
// dominant), scene 2 uses any angle. Each fragment passes through the
// direction decision and issues the four lookups of its bilinear footprint
// to four cache configurations at once: 8 KB and 16 KB, each with u-index
// only and with the A-index. Every returned texel is checked. The miss
// counts and the cycles each cache spent on the lookups are printed.
// Checked: on the v-major and the mixed scene the A-index misses less and
// takes fewer cycles than u-index at both sizes, and the 8 KB A-index
// cache misses no more than the 16 KB u-index cache; on the u-major scene
// the A-index stays within 5 % of u-index in misses and in cycles. Spans are up to about 360
// pixels long, so that the cache size matters.
module tb_index_workload;
  import tex_pkg::*;

  localparam int NTRI = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            start = 1'b0, take = 1'b0, span_start = 1'b0;
  logic [TIDW-1:0] tid = '0;
  logic [UW-1:0]   u = '0;
  logic [VW-1:0]   v = '0;
  logic [CW-1:0]   fu = '0, fv = '0;
  dir_e            dir, dir_l = DIR_U;
  logic [3:0]      busy;
  int              misses [4];
  int              cycles [4];
  int              errors [4];

  dir_decision u_dir (.clk, .rst_n, .take, .span_start, .u(fu), .v(fv), .dir);

  workload_lane #(.SETS(64),  .ADAPT(1'b0)) l0 (.clk, .rst_n, .start, .tid, .u, .v, .dir(dir_l),
                                               .busy(busy[0]), .misses(misses[0]),
                                               .cycles(cycles[0]), .errors(errors[0]));
  workload_lane #(.SETS(64),  .ADAPT(1'b1)) l1 (.clk, .rst_n, .start, .tid, .u, .v, .dir(dir_l),
                                               .busy(busy[1]), .misses(misses[1]),
                                               .cycles(cycles[1]), .errors(errors[1]));
  workload_lane #(.SETS(128), .ADAPT(1'b0)) l2 (.clk, .rst_n, .start, .tid, .u, .v, .dir(dir_l),
                                               .busy(busy[2]), .misses(misses[2]),
                                               .cycles(cycles[2]), .errors(errors[2]));
  workload_lane #(.SETS(128), .ADAPT(1'b1)) l3 (.clk, .rst_n, .start, .tid, .u, .v, .dir(dir_l),
                                               .busy(busy[3]), .misses(misses[3]),
                                               .cycles(cycles[3]), .errors(errors[3]));

  int checks = 0, failures = 0;

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", m);
    end
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic lookup(int tu, int tv);
    u = UW'(tu & 1023);
    v = VW'(tv & 1023);
    start = 1'b1;
    @(posedge clk);
    #1;
    start = 1'b0;
    @(posedge clk);
    #1;
    while (busy != 4'b0) begin
      @(posedge clk);
      #1;
    end
  endtask

  initial begin
    real ang, pi;
    int cs, sn, x0, h, len, u0, v0, uu, vv, nfrag;
    string names [3] = '{"u-major", "v-major", "mixed"};
    pi = 3.14159265358979;
    for (int sc = 0; sc < 3; sc++) begin
      rst_n = 1'b0;
      repeat (3) @(posedge clk);
      rst_n = 1'b1;
      @(posedge clk);
      #1;
      nfrag = 0;
      for (int t = 0; t < NTRI; t++) begin
        case (sc)
          0:       ang = (real'($urandom % 51) - 25.0) * pi / 180.0;
          1:       ang = (90.0 + real'($urandom % 51) - 25.0) * pi / 180.0;
          default: ang = real'($urandom % 360) * pi / 180.0;
        endcase
        cs  = int'($rtoi($cos(ang) * 16.0));
        sn  = int'($rtoi($sin(ang) * 16.0));
        tid = TIDW'(t % 4);
        u0  = $urandom % 16384;
        v0  = $urandom % 16384;
        h   = 10 + $urandom % 20;
        x0  = 0;
        for (int r = 0; r < h; r++) begin
          len = 8 + ((r < h / 2) ? 24 * r : 24 * (h - r));
          for (int i = 0; i < len; i++) begin
            fu = CW'(u0 + (i + x0) * cs - r * sn);
            fv = CW'(v0 + (i + x0) * sn + r * cs);
            span_start = (i == 0);
            #1;
            dir_l = dir;
            // history update on exactly one clock edge
            take = 1'b1;
            @(posedge clk);
            #1;
            take = 1'b0;
            uu = int'(fu) >> FW;
            vv = int'(fv) >> FW;
            lookup(uu, vv);
            lookup(uu + 1, vv);
            lookup(uu, vv + 1);
            lookup(uu + 1, vv + 1);
            nfrag++;
          end
        end
      end
      $display("scene %s: %0d fragments, misses  8KB u-index %0d  A-index %0d   16KB u-index %0d  A-index %0d",
               names[sc], nfrag, misses[0], misses[1], misses[2], misses[3]);
      $display("scene %s: cycles  8KB u-index %0d  A-index %0d   16KB u-index %0d  A-index %0d",
               names[sc], cycles[0], cycles[1], cycles[2], cycles[3]);
      for (int k = 0; k < 4; k++) chk(errors[k] == 0, $sformatf("scene %0d lane %0d texel errors", sc, k));
      if (sc != 0) begin
        chk(misses[1] < misses[0], $sformatf("scene %s: A-index below u-index at 8 KB", names[sc]));
        chk(misses[3] < misses[2], $sformatf("scene %s: A-index below u-index at 16 KB", names[sc]));
        chk(misses[1] <= misses[2], $sformatf("scene %s: 8 KB A-index not above 16 KB u-index", names[sc]));
        chk(cycles[1] < cycles[0], $sformatf("scene %s: A-index fewer cycles than u-index at 8 KB", names[sc]));
        chk(cycles[3] < cycles[2], $sformatf("scene %s: A-index fewer cycles than u-index at 16 KB", names[sc]));
      end else begin
        chk(misses[1] * 20 <= misses[0] * 21, "u-major scene: A-index within 5 % of u-index");
        chk(cycles[1] * 20 <= cycles[0] * 21, "u-major scene: A-index cycles within 5 % of u-index");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
