// Shared body of the end-to-end classifier testbenches. The including module
// defines the localparams WB and AB (weight and activation bits) and
// instantiates cnv_top as `dut` on the signals declared here.
//
// What it does:
//   * builds pseudo-random weights from a hash of (layer, row, column) and
//     random images;
//   * runs a reference model of the whole network in plain SystemVerilog on
//     image 0 layer by layer and sets each layer's thresholds from the
//     spread of that layer's sums (mean, and mean +/- 0.67 standard
//     deviations for three thresholds), so that all activation levels occur;
//   * loads every weight and threshold word through the cfg port;
//   * streams NIMG images back to back, with the result held back for a while
//     on the first result, and compares class and ten scores per image;
//   * counts the mechanisms: pipelined overlap of images, engine stalls on a
//     busy consumer, max-pool outputs, result backpressure, every activation
//     level; checks that each engine spends exactly its
//     (pixels x NF x SF) cycles per image and that results come one dense1
//     period apart.
import cnv_pkg::*;

localparam int NIMG = 2;
localparam int NT   = (1 << AB) - 1;

logic clk = 0, rst_n = 0;
always #5 clk = ~clk;
int checks = 0, failures = 0;

cfg_t cfg;
logic img_valid, img_ready, res_valid, res_ready;
logic [23:0] img_data;
logic [3:0]  res_class;
logic [NUM_CLASSES*ACC_W-1:0] res_scores;

// layer table: input dim, input channels, output channels, PE, SIMD
// (dense layers: dim 1, input channels = vector length)
localparam int NL = 8;
int L_DIM [NL] = '{32, 30, 14, 12, 5, 1, 1, 1};
int L_CIN [NL] = '{3, 32, 64, 128, 128, 2304, 512, 512};
int L_COUT[NL] = '{32, 64, 128, 128, 256, 512, 512, 64};
int L_PE  [NL] = '{C1_PE, C2_PE, C3_PE, C4_PE, C5_PE, D1_PE, D2_PE, D3_PE};
int L_SIMD[NL] = '{C1_SIMD, C2_SIMD, C3_SIMD, C4_SIMD, C5_SIMD, D1_SIMD, D2_SIMD, D3_SIMD};
// cycles each engine needs per image: output pixels x (MH/PE) x (MW/SIMD)
int L_CYC [NL] = '{16200, 14112, 20736, 28800, 20736, 294912, 32768, 8192};

function automatic int unsigned hsh(int unsigned a, int unsigned b, int unsigned c);
  int unsigned x;
  x = a * 32'h9E3779B1 ^ b * 32'h85EBCA77 ^ c * 32'hC2B2AE3D ^ 32'h27D4EB2F;
  x ^= x >> 15; x *= 32'h2C1B3C6D; x ^= x >> 12; x *= 32'h297A2D39; x ^= x >> 15;
  return x;
endfunction

// weight code of (layer, row, column)
function automatic logic [1:0] wcode(int l, int r, int c);
  return 2'(hsh(l, r, c) >> 7);
endfunction

int thr [NL][512][3];
int mw_of [NL];

function automatic int mwidth(int l);
  return (l < 5) ? 9 * L_CIN[l] : L_CIN[l];
endfunction

// reference: one layer, input codes -> sums (for all output pixels, rows)
// in: [(y*D+x)*C + c], sums: [(oy*O+ox)*MH + r]
task automatic ref_layer(input int l, input int in_codes[], input int in_bits,
                         input bit bip, output int sums[]);
  int D, C, MH, O, K, MW;
  int wv [];
  D = L_DIM[l]; C = L_CIN[l]; MH = L_COUT[l];
  if (l < 5) begin K = 3; O = D - 2; end
  else       begin K = 1; O = 1; end
  MW = mwidth(l);
  wv = new[MH * MW];
  for (int r = 0; r < MH; r++)
    for (int c = 0; c < MW; c++) wv[r*MW + c] = wval(wcode(l, r, c), WB);
  sums = new[O * O * MH];
  for (int oy = 0; oy < O; oy++)
    for (int ox = 0; ox < O; ox++) begin
      int vec [];
      vec = new[MW];
      for (int ky = 0; ky < K; ky++)
        for (int kx = 0; kx < K; kx++)
          for (int c = 0; c < C; c++) begin
            int e, code;
            e = (ky*K + kx)*C + c;
            code = (K == 3) ? in_codes[((oy+ky)*D + ox+kx)*C + c] : in_codes[e];
            vec[e] = aval(8'(code), in_bits, bip);
          end
      for (int r = 0; r < MH; r++) begin
        int s;
        s = 0;
        for (int e = 0; e < MW; e++) s += wv[r*MW + e] * vec[e];
        sums[(oy*O + ox)*MH + r] = s;
      end
    end
endtask

function automatic int quant(int s, int l, int r);
  int n;
  n = 0;
  for (int k = 0; k < NT; k++) if (s >= thr[l][r][k]) n++;
  return n;
endfunction

task automatic maxpool_ref(input int in_codes[], input int D, input int C, output int o[]);
  o = new[(D/2)*(D/2)*C];
  for (int y = 0; y < D/2; y++)
    for (int x = 0; x < D/2; x++)
      for (int c = 0; c < C; c++) begin
        int m;
        m = 0;
        for (int dy = 0; dy < 2; dy++)
          for (int dx = 0; dx < 2; dx++)
            if (in_codes[((2*y+dy)*D + 2*x+dx)*C + c] > m) m = in_codes[((2*y+dy)*D + 2*x+dx)*C + c];
        o[(y*(D/2) + x)*C + c] = m;
      end
endtask

int level_seen [4];
bit set_thr;

// full reference for one image; with set_thr, derive thresholds first
task automatic ref_net(input int img[], output int scores[]);
  int codes [];
  int sums [];
  int bits;
  bit bip;
  codes = img; bits = 8; bip = 0;
  for (int l = 0; l < NL; l++) begin
    int MH, npix;
    ref_layer(l, codes, bits, bip, sums);
    MH = L_COUT[l];
    npix = sums.size() / MH;
    if (l == NL - 1) begin
      scores = sums;
      return;
    end
    if (set_thr) begin
      real mean, var_, sd;
      mean = 0; var_ = 0;
      foreach (sums[i]) mean += sums[i];
      mean /= sums.size();
      foreach (sums[i]) var_ += (sums[i] - mean) * (sums[i] - mean);
      sd = $sqrt(var_ / sums.size());
      for (int r = 0; r < MH; r++) begin
        int j;
        j = int'(hsh(l, r, 99) % 3) - 1;
        if (NT == 1) thr[l][r][0] = int'(mean) + j;
        else begin
          thr[l][r][0] = int'(mean - 0.67 * sd) + j;
          thr[l][r][1] = int'(mean) + j;
          thr[l][r][2] = int'(mean + 0.67 * sd) + j;
        end
      end
    end
    codes = new[sums.size()];
    for (int p = 0; p < npix; p++)
      for (int r = 0; r < MH; r++) begin
        codes[p*MH + r] = quant(sums[p*MH + r], l, r);
        level_seen[codes[p*MH + r]]++;
      end
    bits = AB; bip = (AB == 1);
    if (l == 1) begin int t[]; maxpool_ref(codes, 28, 64, t); codes = t; end
    if (l == 3) begin int t[]; maxpool_ref(codes, 10, 128, t); codes = t; end
  end
endtask

// ---------------------------------------------------------------- monitors
longint cyc = 0;
always @(posedge clk) cyc++;

int busy_cyc [NL];
int stall_cyc = 0, pool_out = 0, overlap = 0, res_bp = 0;
int img_accepted = 0, res_seen = 0;
longint res_rise [$];
logic res_valid_q = 0;

always @(posedge clk) if (rst_n) begin
  busy_cyc[0] += int'(dut.u_conv1.adv);
  busy_cyc[1] += int'(dut.u_conv2.adv);
  busy_cyc[2] += int'(dut.u_conv3.adv);
  busy_cyc[3] += int'(dut.u_conv4.adv);
  busy_cyc[4] += int'(dut.u_conv5.adv);
  busy_cyc[5] += int'(dut.u_dense1.adv);
  busy_cyc[6] += int'(dut.u_dense2.adv);
  busy_cyc[7] += int'(dut.u_dense3.adv);
  if (dut.u_conv1.busy && !dut.u_conv1.adv) stall_cyc++;
  if (dut.u_conv2.busy && !dut.u_conv2.adv) stall_cyc++;
  if (dut.u_conv3.busy && !dut.u_conv3.adv) stall_cyc++;
  if (dut.u_conv4.busy && !dut.u_conv4.adv) stall_cyc++;
  if (dut.u_conv5.busy && !dut.u_conv5.adv) stall_cyc++;
  if (dut.u_pool1.out_valid && dut.u_pool1.out_ready) pool_out++;
  if (dut.u_pool2.out_valid && dut.u_pool2.out_ready) pool_out++;
  if (img_valid && img_ready) begin
    img_accepted++;
    if (img_accepted > 1024 && res_seen == 0) overlap++;
  end
  if (res_valid && !res_ready) res_bp++;
  res_valid_q <= res_valid;
  if (res_valid && !res_valid_q) res_rise.push_back(cyc);
end

int exp_cls [NIMG];
int exp_sc  [NIMG][NUM_CLASSES];

always @(posedge clk) if (rst_n && res_valid && res_ready) begin
  logic bad;
  bad = 0;
  checks++;
  if (int'(res_class) != exp_cls[res_seen]) bad = 1;
  for (int i = 0; i < NUM_CLASSES; i++)
    if (int'($signed(res_scores[i*ACC_W +: ACC_W])) != exp_sc[res_seen][i]) bad = 1;
  if (bad) begin
    failures++;
    $display("image %0d: class %0d expected %0d", res_seen, res_class, exp_cls[res_seen]);
  end
  $display("image %0d: class %0d at cycle %0d", res_seen, res_class, cyc);
  res_seen++;
end

int imgs [NIMG][];

initial begin
  cfg = '0; img_valid = 0; img_data = '0; res_ready = 1;
  for (int n = 0; n < NIMG; n++) begin
    imgs[n] = new[32*32*3];
    foreach (imgs[n][i]) imgs[n][i] = int'($urandom % 256);
  end
  // reference model, thresholds from image 0
  for (int n = 0; n < NIMG; n++) begin
    int sc [];
    set_thr = (n == 0);
    ref_net(imgs[n], sc);
    exp_cls[n] = 0;
    for (int i = 0; i < NUM_CLASSES; i++) begin
      exp_sc[n][i] = sc[i];
      if (sc[i] > sc[exp_cls[n]]) exp_cls[n] = i;
    end
    $display("reference image %0d: class %0d", n, exp_cls[n]);
  end
  repeat (3) @(posedge clk);
  rst_n = 1;
  // parameter load
  for (int l = 0; l < NL; l++) begin
    int MH, MW, PE, S, NF, SF;
    MH = L_COUT[l]; MW = mwidth(l); PE = L_PE[l]; S = L_SIMD[l];
    NF = MH / PE; SF = MW / S;
    for (int p = 0; p < PE; p++)
      for (int nf = 0; nf < NF; nf++) begin
        for (int sf = 0; sf < SF; sf++) begin
          @(negedge clk);
          cfg = '0; cfg.wr_w = 1; cfg.layer = 4'(l); cfg.pe = 8'(p);
          cfg.addr = 24'(nf*SF + sf);
          for (int s = 0; s < S; s++)
            cfg.data[s*WB +: WB] = WB'(wcode(l, nf*PE + p, sf*S + s));
        end
        if (l < NL - 1) begin
          @(negedge clk);
          cfg = '0; cfg.wr_t = 1; cfg.layer = 4'(l); cfg.pe = 8'(p); cfg.addr = 24'(nf);
          for (int k = 0; k < NT; k++)
            cfg.data[k*ACC_W +: ACC_W] = ACC_W'(thr[l][nf*PE + p][k]);
        end
      end
  end
  @(negedge clk); cfg = '0;
  $display("parameters loaded at cycle %0d", cyc);
  fork
    begin
      // images back to back, pixels in row-major order
      for (int n = 0; n < NIMG; n++)
        for (int p = 0; p < 1024; p++) begin
          img_valid = 1;
          img_data = {8'(imgs[n][p*3+2]), 8'(imgs[n][p*3+1]), 8'(imgs[n][p*3])};
          #1;
          while (!img_ready) begin @(negedge clk); #1; end
          @(posedge clk);
          @(negedge clk);
        end
      img_valid = 0;
    end
    begin
      // hold the first result back for 50 cycles
      wait (res_valid);
      @(negedge clk); res_ready = 0;
      repeat (50) @(negedge clk);
      res_ready = 1;
    end
  join
  wait (res_seen == NIMG);
  repeat (10) @(negedge clk);
  // engine cycle counts per image
  for (int l = 0; l < NL; l++) begin
    checks++;
    if (busy_cyc[l] != NIMG * L_CYC[l]) begin
      failures++;
      $display("engine %0d: %0d busy cycles, expected %0d", l, busy_cyc[l], NIMG * L_CYC[l]);
    end
  end
  checks++;
  if (res_rise.size() != NIMG || res_rise[1] - res_rise[0] != L_CYC[5]) begin
    failures++;
    $display("result interval %0d, expected %0d", res_rise.size() > 1 ? res_rise[1] - res_rise[0] : -1, L_CYC[5]);
  end
  // mechanisms
  $display("mechanisms: overlap=%0d stalls=%0d pool_out=%0d result_backpressure=%0d",
           overlap, stall_cyc, pool_out, res_bp);
  checks++; if (overlap == 0)   begin failures++; $display("no image overlap"); end
  checks++; if (stall_cyc == 0) begin failures++; $display("no engine stall"); end
  checks++; if (pool_out != NIMG * (14*14 + 5*5)) begin failures++; $display("pool outputs %0d", pool_out); end
  checks++; if (res_bp == 0)    begin failures++; $display("no result backpressure"); end
  for (int k = 0; k <= NT; k++) begin
    checks++;
    if (level_seen[k] == 0) begin failures++; $display("activation level %0d never produced", k); end
  end
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end
