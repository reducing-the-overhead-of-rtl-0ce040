// tb_hmtlb_sweep: the hybrid mapped TLB in the 20 configurations of the
// size study (master TLB of 16, 32, 64, 128 or 256 entries, pages of 4, 8,
// 16 or 32 KB, always with a 4-entry slave), all running the same synthetic
// trace side by side (hmtlb_sweep_point).
//
// Besides checking every translation, it prints for each configuration the
// master and hybrid misses per instruction (MPI, taking one load/store per
// three instructions) and the maximum effective cycle time ratio
// n / (n + MPI_master) for n = 0.5, 1 and 2 cycles per instruction: the
// fraction of the conventional TLB's cycle time the hybrid TLB's cycle
// must stay under to break even, since each master miss costs one cycle.
// It also checks that the slave removes misses: in every configuration the
// misses in both tables are no more than the master misses, and summed over
// all configurations strictly fewer.
module tb_hmtlb_sweep;
  localparam int NM = 5, NP = 4, N_REF = 50000;
  localparam int MNS[NM] = '{16, 32, 64, 128, 256};
  localparam int PBS[NP] = '{12, 13, 14, 15};

  logic clk = 0, rst_n = 0;
  logic done [NM][NP];
  int c [NM][NP], f [NM][NP], mm [NM][NP], hm [NM][NP];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NM; i++) begin : g_m
    for (genvar j = 0; j < NP; j++) begin : g_p
      hmtlb_sweep_point #(.MN(MNS[i]), .PB(PBS[j]), .N_REF(N_REF)) u_pt (
        .clk, .rst_n, .done(done[i][j]), .checks(c[i][j]), .failures(f[i][j]),
        .master_misses(mm[i][j]), .hybrid_misses(hm[i][j]));
    end
  end

  function automatic bit all_done();
    for (int i = 0; i < NM; i++)
      for (int j = 0; j < NP; j++)
        if (!done[i][j]) return 0;
    return 1;
  endfunction

  initial begin
    real instr, mpi_m, mpi_h;
    int sum_m, sum_h;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!all_done()) @(posedge clk);
    instr = 3.0 * N_REF;
    sum_m = 0; sum_h = 0;
    $display("page  entries  MPI master  MPI hybrid  ratio n=0.5  n=1     n=2");
    for (int j = 0; j < NP; j++)
      for (int i = 0; i < NM; i++) begin
        checks += c[i][j];
        failures += f[i][j];
        mpi_m = mm[i][j] / instr;
        mpi_h = hm[i][j] / instr;
        $display("%2dK   %3d      %.5f     %.5f     %.4f       %.4f  %.4f",
                 (1 << PBS[j]) / 1024, MNS[i], mpi_m, mpi_h,
                 0.5 / (0.5 + mpi_m), 1.0 / (1.0 + mpi_m), 2.0 / (2.0 + mpi_m));
        checks++;
        if (hm[i][j] > mm[i][j]) failures++;
        sum_m += mm[i][j];
        sum_h += hm[i][j];
      end
    checks++;
    if (!(sum_h < sum_m)) begin
      failures++;
      $display("FAIL the slave removed no misses");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
