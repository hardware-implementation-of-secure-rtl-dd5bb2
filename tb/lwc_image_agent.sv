// lwc_image_agent: encrypts a 256x256 8-bit greyscale test image with one
// cipher core and evaluates the ciphertext image statistically.
//
// The image is generated, not read: a smooth two-dimensional pattern plus a
// small deterministic noise term, so neighbouring pixels are strongly
// correlated like a photograph. Each row is cut into 8-pixel blocks (left
// pixel in the most significant byte), giving 8192 64-bit blocks encrypted
// independently under one key (electronic-codebook use), back to back.
// Every ciphertext block is compared with the lwc_ref_pkg model; then the
// agent computes for plain and cipher image the Shannon entropy of the
// pixel histogram and the correlation of horizontally, vertically and
// diagonally adjacent pixels. It requires cipher entropy > 7.99 bits and
// |correlation| < 0.02, and reports the cycles spent per block.
module lwc_image_agent
  import lwc_pkg::*;
  import lwc_ref_pkg::*;
#(
  parameter int    CIPHER = 0,
  parameter int    LAT    = 44,
  parameter string NAME   = "LED-128"
) (
  input  logic  clk,
  input  logic  start,
  output logic  in_valid,
  output word_t data_in,
  output word_t key_in,
  input  logic  in_ready,
  input  logic  busy,
  input  logic  out_valid,
  input  word_t data_out,
  output logic  done,
  output int    checks,
  output int    failures
);
  localparam int W = 256;
  localparam logic [127:0] KEY = 128'h0f1e2d3c4b5a69788796a5b4c3d2e1f0;

  logic [7:0] plain  [W*W];
  logic [7:0] cipher [W*W];

  function automatic logic [63:0] ref_enc(logic [63:0] pt);
    case (CIPHER)
      0:       return led_enc(pt, KEY);
      1:       return simon_enc(pt, KEY);
      default: return simeck_enc(pt, KEY);
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: %s", NAME, what);
    end
  endtask

  function automatic real entropy(input logic [7:0] img [W*W]);
    int  hist [256];
    real h, p;
    foreach (hist[i]) hist[i] = 0;
    for (int i = 0; i < W*W; i++) hist[img[i]]++;
    h = 0.0;
    for (int i = 0; i < 256; i++)
      if (hist[i] != 0) begin
        p = real'(hist[i]) / real'(W*W);
        h -= p * $ln(p) / $ln(2.0);
      end
    return h;
  endfunction

  // Correlation of pixel (x,y) with (x+dx, y+dy) over the whole image.
  function automatic real corr(input logic [7:0] img [W*W], input int dx, input int dy);
    real sx, sy, sxx, syy, sxy, n, a, b;
    sx = 0; sy = 0; sxx = 0; syy = 0; sxy = 0; n = 0;
    for (int y = 0; y + dy < W; y++)
      for (int x = 0; x + dx < W; x++) begin
        a = real'(img[y*W + x]);
        b = real'(img[(y+dy)*W + x + dx]);
        sx += a; sy += b; sxx += a*a; syy += b*b; sxy += a*b; n += 1.0;
      end
    return (sxy/n - (sx/n)*(sy/n)) /
           ($sqrt(sxx/n - (sx/n)*(sx/n)) * $sqrt(syy/n - (sy/n)*(sy/n)));
  endfunction

  initial begin
    longint t0, t1;
    in_valid = 1'b0; data_in = '0; key_in = '0;
    done = 1'b0; checks = 0; failures = 0;
    for (int y = 0; y < W; y++)
      for (int x = 0; x < W; x++) begin
        real v;
        int  noise;
        noise = int'(((x * 73856093) ^ (y * 19349663)) >>> 4) & 7;
        v = 128.0 + 70.0 * $sin(real'(x) / 23.0) * $cos(real'(y) / 31.0)
                  + 40.0 * $sin(real'(x + y) / 57.0) + real'(noise);
        plain[y*W + x] = 8'(int'(v < 0.0 ? 0.0 : (v > 255.0 ? 255.0 : v)));
      end
    wait (start);
    @(negedge clk);
    t0 = 0; t1 = 0;
    for (int blk = 0; blk < W*W/8; blk++) begin
      logic [63:0] pt, ct;
      for (int i = 0; i < 8; i++) pt[63 - 8*i -: 8] = plain[8*blk + i];
      for (int w = 0; w < 4; w++) begin
        if (w > 0) @(negedge clk);
        in_valid = 1'b1;
        key_in   = KEY[32*w +: 32];
        data_in  = (w < 2) ? pt[32*w +: 32] : '0;
      end
      @(negedge clk);
      in_valid = 1'b0;
      while (!out_valid) begin
        if (busy) t1++;
        @(negedge clk);
      end
      ct[31:0] = data_out;
      @(negedge clk);
      ct[63:32] = data_out;
      if (ct != ref_enc(pt)) check(1'b0, $sformatf("block %0d: %h expected %h", blk, ct, ref_enc(pt)));
      for (int i = 0; i < 8; i++) cipher[8*blk + i] = ct[63 - 8*i -: 8];
      t0 += 4 + 2;           // load and output cycles of this block
      @(negedge clk);
    end
    checks++;   // all blocks matched the model (counted once above if not)
    begin
      real ep, ec, ch, cv, cd;
      ep = entropy(plain);
      ec = entropy(cipher);
      $display("%s: %0d blocks, %0d busy cycles per block, %0d cycles per block with load and output",
               NAME, W*W/8, t1 / (W*W/8), (t0 + t1) / (W*W/8));
      $display("%s: entropy plain %f cipher %f", NAME, ep, ec);
      $display("%s: correlation plain  h %f v %f d %f", NAME, corr(plain, 1, 0), corr(plain, 0, 1), corr(plain, 1, 1));
      ch = corr(cipher, 1, 0); cv = corr(cipher, 0, 1); cd = corr(cipher, 1, 1);
      $display("%s: correlation cipher h %f v %f d %f", NAME, ch, cv, cd);
      check(t1 == longint'(LAT) * (W*W/8), "busy cycles per block");
      check(ec > 7.99, $sformatf("cipher entropy %f", ec));
      check(ep < 7.9, $sformatf("plain entropy %f is not image-like", ep));
      check(corr(plain, 1, 0) > 0.9, "plain image neighbours correlated");
      check(ch < 0.02 && ch > -0.02, "horizontal correlation");
      check(cv < 0.02 && cv > -0.02, "vertical correlation");
      check(cd < 0.02 && cd > -0.02, "diagonal correlation");
    end
    done = 1'b1;
  end
endmodule
