// tb_crs: random hard decisions, MD_init and selection lists into a CRS with
// P = 24, NS = 3.  The expected output starts from zhat and, for every
// filled list place whose distance is strictly below MD_init, writes that
// place's candidate at its symbol index.  Distances equal to MD_init are
// forced now and then to check that they do not replace.
module tb_crs;
  localparam int P   = 24;
  localparam int NS  = 3;
  localparam int MDW = 12;
  localparam int PTW = 3;
  localparam int IW  = 5;

  logic signed [PTW-1:0] zr [P], zi [P], orr [P], oi [P];
  logic                  rep [P];
  logic        [MDW-1:0] mdi;
  logic                  sok [NS];
  logic        [MDW-1:0] smd [NS];
  logic        [IW-1:0]  sidx [NS];
  logic signed [PTW-1:0] sre [NS], sim [NS];

  crs #(.P(P), .NS(NS), .MDW(MDW), .PTW(PTW), .IW(IW)) dut (
    .zh_re(zr), .zh_im(zi), .md_init(mdi), .sel_ok(sok), .sel_md(smd), .sel_idx(sidx),
    .sel_re(sre), .sel_im(sim), .o_re(orr), .o_im(oi), .replaced(rep));

  int checks = 0, failures = 0, nrep = 0, nkeep = 0;

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int er[P], ei[P];
      bit erep[P];
      int used[P];
      for (int p = 0; p < P; p++) begin
        zr[p] = PTW'(2 * int'($urandom % 4) - 3);
        zi[p] = PTW'(2 * int'($urandom % 4) - 3);
        er[p] = int'(zr[p]); ei[p] = int'(zi[p]); erep[p] = 0; used[p] = 0;
      end
      mdi = MDW'(1000 + $urandom % 100);
      for (int i = 0; i < NS; i++) begin
        int p;
        do p = int'($urandom % P); while (used[p] != 0);   // distinct symbols
        used[p] = 1;
        sidx[i] = IW'(p);
        sok[i]  = ($urandom % 5 != 0);
        smd[i]  = ($urandom % 6 == 0) ? mdi : MDW'(950 + $urandom % 150);
        sre[i]  = PTW'(2 * int'($urandom % 4) - 3);
        sim[i]  = PTW'(2 * int'($urandom % 4) - 3);
        if (sok[i] && smd[i] < mdi) begin
          er[p] = int'(sre[i]); ei[p] = int'(sim[i]); erep[p] = 1; nrep++;
        end else nkeep++;
      end
      #1;
      for (int p = 0; p < P; p++) begin
        checks++;
        if (int'(orr[p]) != er[p] || int'(oi[p]) != ei[p] || rep[p] != erep[p]) begin
          failures++;
          $display("n=%0d p=%0d: got (%0d,%0d,%0b) expected (%0d,%0d,%0b)", n, p, orr[p], oi[p],
                   rep[p], er[p], ei[p], erep[p]);
        end
      end
    end
    checks++;
    if (nrep == 0 || nkeep == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
