// tb_dfadc_channel -- one channel's digital feedback path, bit-exact.
// Random thermometer words (with bubbles) drive the channel while the two
// filter settings, the blocker filter's loop connection, its restarts and
// the enables change at random. A cycle model written here -- decoder,
// two resonators, saturating sum, compensation LPF, error-feedback
// truncator, thermometer encoder -- runs alongside and every output is
// compared every cycle, which also pins the timing: code and blocker-filter
// output change on the clk edge after the thermometer word is applied, the
// DAC word on the clk_dig edge 0.7 period after that.
module tb_dfadc_channel;
  import dfadc_pkg::*;

  logic                 clk = 0, clk_dig = 0, rst_n = 0;
  logic [THERM_W-1:0]   therm = '0;
  bpf_cfg_t             tx_cfg = '0, bl_cfg = '0;
  logic                 bl_clr = 0, bl_in_loop = 0;
  adc_code_t            code;
  word_t                bl_y;
  dac_word_t            dac_word;
  logic [DAC_CELLS-1:0] dac_cells;
  int checks = 0, failures = 0;

  dfadc_channel dut (.*);

  always #1 clk = ~clk;
  // DAC clock: the same clock delayed by 0.7 period
  initial begin
    #1.4;
    forever #1 clk_dig = ~clk_dig;
  end

  // ---- reference model ----
  typedef struct { longint low, band, y; } res_t;
  res_t   m_tx, m_bl;
  longint m_code, m_lx, m_ls, m_ly, m_e, m_w;
  localparam longint AMAX = (64'sd1 <<< 29) - 1;
  localparam longint SMAX = (64'sd1 <<< 43) - 1;

  function automatic longint clamp(longint v, longint lo, longint hi);
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic res_t res_step(res_t s, longint xi, bpf_cfg_t c, bit clr);
    res_t   n;
    longint hi;
    if (!c.en || clr) return '{0, 0, 0};
    n.low  = clamp(s.low + ((longint'(c.f_coef) * s.band) >>> 9), -AMAX - 1, AMAX);
    hi     = clamp((xi <<< 16) - n.low - ((longint'(c.q_coef) * s.band) >>> 9), -AMAX - 1, AMAX);
    n.band = clamp(s.band + ((longint'(c.f_coef) * hi) >>> 9), -AMAX - 1, AMAX);
    n.y    = clamp((n.band + (64'sd1 <<< (3 + c.gshift))) >>> (4 + c.gshift), -131072, 131071);
    return n;
  endfunction

  // one clock edge: the DAC register takes the word computed from the code
  // register and the filter states, then all registers advance
  function automatic void model_edge();
    bit     on;
    res_t   ntx, nbl;
    longint sum, w, s, ly, t;
    on  = tx_cfg.en || (bl_cfg.en && bl_in_loop);
    ntx = res_step(m_tx, m_code, tx_cfg, 1'b0);
    nbl = res_step(m_bl, m_code, bl_cfg, bl_clr);
    sum = clamp(ntx.y + (bl_in_loop ? nbl.y : 0), -131072, 131071);
    if (on) begin
      w  = (sum <<< 12) - 3439 * m_lx;
      s  = clamp((4060 * m_ls + 4489 * w) >>> 12, -SMAX - 1, SMAX);
      ly = clamp((s + 2048) >>> 12, -131072, 131071);
      m_ls = s; m_lx = sum;
    end else begin
      ly = 0; m_ls = 0; m_lx = 0;
    end
    t   = (ly + m_e) >>> 12;
    m_w = clamp(t, -16, 16);
    m_e = on ? ((ly + m_e) & 64'hFFF) : 0;
    m_tx = ntx; m_bl = nbl;
    m_code = $countones(therm) - 8;
  endfunction

  // combinational blocker-filter output for the present registers and inputs
  function automatic longint bl_now();
    res_t r;
    r = res_step(m_bl, m_code, bl_cfg, bl_clr);
    return r.y;
  endfunction

  function automatic logic [THERM_W-1:0] therm_of(int level);
    logic [THERM_W-1:0] t;
    t = '0;
    for (int i = 0; i < THERM_W; i++) t[i] = (i < level + 8);
    if ($urandom_range(0, 19) == 0) t[$urandom_range(0, THERM_W-1)] ^= 1'b1;  // bubble
    return t;
  endfunction

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ph, fr, amp;
    int  nclip, nloop;
    m_tx = '{0, 0, 0}; m_bl = '{0, 0, 0};
    m_code = 0; m_lx = 0; m_ls = 0; m_ly = 0; m_e = 0; m_w = 0;
    nclip = 0; nloop = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    ph = 0.0;
    for (int n = 0; n < 40000; n++) begin
      if (n % 2000 == 0) begin
        tx_cfg = '{en: ($urandom_range(0, 5) != 0), f_coef: coef_t'($urandom_range(60, 470)),
                   q_coef: coef_t'($urandom_range(10, 60)), gshift: GSH_W'($urandom_range(0, 3))};
        bl_cfg = '{en: ($urandom_range(0, 3) != 0), f_coef: coef_t'($urandom_range(60, 470)),
                   q_coef: coef_t'($urandom_range(10, 60)), gshift: GSH_W'($urandom_range(0, 3))};
        bl_in_loop = ($urandom_range(0, 2) != 0);
        fr  = real'($urandom_range(10, 120)) / 720.0;
        amp = real'($urandom_range(1, 9));
      end
      bl_clr = ($urandom_range(0, 999) == 0);
      ph += 2.0 * 3.141592653589793 * fr;
      therm = therm_of(int'($floor(amp * $sin(ph) + real'($urandom_range(0, 99)) / 100.0)));
      @(posedge clk);
      model_edge();
      @(negedge clk);
      checks++;
      if (longint'(code) != m_code || longint'(bl_y) != bl_now() || longint'(dac_word) != m_w) begin
        failures++;
        if (failures < 10)
          $display("n %0d: code %0d/%0d bl_y %0d/%0d dac %0d/%0d", n, code, m_code, bl_y, bl_now(), dac_word, m_w);
      end
      checks++;
      if (dac_cells != 32'((64'd1 << (m_w + 16)) - 1)) begin
        failures++;
        if (failures < 10) $display("n %0d: cells %h for word %0d", n, dac_cells, m_w);
      end
      if (m_w == 16 || m_w == -16) nclip++;
      if (bl_in_loop && bl_cfg.en && m_bl.y != 0) nloop++;
    end
    $display("DAC words at full scale: %0d, cycles with blocker filter in loop: %0d", nclip, nloop);
    checks++;
    if (nclip == 0 || nloop == 0) begin
      failures++;
      $display("clipping or blocker loop path never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
