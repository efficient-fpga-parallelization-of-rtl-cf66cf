// tb_lip_sweep_unit: one engine of a given size with its own driver and
// checker, used by tb_lip_time_sweep. It loads NPTS random points (spare
// slots padded with copies of point 0), runs NQ random queries one after
// another, and checks each result against the reference model and each
// latency against DEPTH+2 clock edges. It raises done when finished and
// reports its counts on checks/failures/cycles (mean cycles per query).
module tb_lip_sweep_unit #(
  parameter int K = 8,
  parameter int DEPTH = 4,
  parameter int NPTS = 30,
  parameter int NQ = 20
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   cycles
);
  import tb_lip_ref_pkg::*;

  localparam int W = 16, NW = 3, NY = 1, ONE = 4096, CAP = K * DEPTH;
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int BW = (K > 1) ? $clog2(K) : 1;
  localparam int RW = (NY + NW) * W;

  logic start = 0, ld_we = 0, busy, valid;
  logic [NW-1:0][W-1:0] q = '0;
  logic [NY-1:0][W-1:0] f_out;
  logic [BW-1:0] ld_bank = '0;
  logic [AW-1:0] ld_addr = '0;
  logic [RW-1:0] ld_data = '0;
  int dw[], df[], qv[];

  lip_top #(.W(W), .NW(NW), .NY(NY), .K(K), .DEPTH(DEPTH)) dut (.*);

  initial begin
    int src, lat, total;
    done = 0; checks = 0; failures = 0; cycles = 0; total = 0;
    dw = new[NPTS * NW]; df = new[NPTS];
    foreach (dw[i]) dw[i] = $urandom_range(0, ONE);
    foreach (df[i]) df[i] = $urandom_range(0, ONE);
    @(posedge rst_n);
    for (int s = 0; s < CAP; s++) begin
      src = (s < NPTS) ? s : 0;
      @(negedge clk);
      ld_we = 1; ld_bank = BW'(s % K); ld_addr = AW'(s / K);
      ld_data[RW-1 -: W] = W'(df[src]);
      for (int k = 0; k < NW; k++) ld_data[(NW-1-k)*W +: W] = W'(dw[src*NW + k]);
    end
    @(negedge clk) ld_we = 0;
    qv = new[NW];
    for (int n = 0; n < NQ; n++) begin
      foreach (qv[k]) begin qv[k] = $urandom_range(0, ONE); q[k] = W'(qv[k]); end
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 0;
      while (!valid && lat < 1000) begin @(negedge clk); lat++; end
      total += lat;
      checks += 2;
      if (lat != DEPTH + 2) begin
        failures++;
        $display("K=%0d DEPTH=%0d: latency %0d, want %0d", K, DEPTH, lat, DEPTH + 2);
      end
      if (sext(f_out[0], W) != lip_ref(qv, dw, df, NPTS, NW, NY, 0)) begin
        failures++;
        $display("K=%0d DEPTH=%0d query %0d: got %0d want %0d", K, DEPTH, n,
                 sext(f_out[0], W), lip_ref(qv, dw, df, NPTS, NW, NY, 0));
      end
    end
    cycles = total / NQ;
    done = 1;
  end
endmodule
