// tb_ref_pkg: reference model for the testbenches. Builds a model image in
// the layout the Model Manager expects, and performs one stochastic gradient
// descent step on it in plain SystemVerilog, with the same fixed-point
// arithmetic and the same order of operations as the hardware, so results
// must match bit for bit.
// Interface: make_image() builds a model image, train() applies one step.
// No timing (pure functions). The equations follow the source's operation
// list; the number format and image layout are this design's.
package tb_ref_pkg;
  import ml_pkg::*;

  typedef word_t img_t[];

  // Test network: linear 3->4, ReLU, linear 4->2.
  localparam int NL = 3;
  localparam int IN0 = 3, HID = 4, NOUT = 2;
  // offsets inside the image
  localparam int O_W0 = 28, O_Z0 = 44, O_DZ0 = 48, O_G0 = 52;
  localparam int O_Z1 = 68, O_DZ1 = 72;
  localparam int O_W2 = 76, O_Z2 = 86, O_DZ2 = 88, O_G2 = 90;
  localparam int IMG_WORDS = 100;

  function automatic word_t fx(real r);
    return word_t'(int'(r * 65536.0));
  endfunction

  function automatic word_t rnd_small();
    // uniform in about [-1, 1)
    return word_t'(int'($urandom_range(131071)) - 65536);
  endfunction

  function automatic img_t make_image(word_t lr);
    img_t m = new[IMG_WORDS];
    foreach (m[i]) m[i] = '0;
    m[HDR_NLAYERS] = NL; m[HDR_LR] = lr; m[HDR_NOUT] = NOUT;
    // layer 0
    m[4+0] = LAYER_LINEAR; m[4+1] = IN0; m[4+2] = HID;
    m[4+3] = O_W0; m[4+4] = O_Z0; m[4+5] = O_DZ0; m[4+6] = O_G0;
    // layer 1
    m[12+0] = LAYER_RELU; m[12+1] = HID; m[12+2] = HID;
    m[12+4] = O_Z1; m[12+5] = O_DZ1;
    // layer 2
    m[20+0] = LAYER_LINEAR; m[20+1] = HID; m[20+2] = NOUT;
    m[20+3] = O_W2; m[20+4] = O_Z2; m[20+5] = O_DZ2; m[20+6] = O_G2;
    for (int i = 0; i < IN0*HID + HID; i++)  m[O_W0 + i] = rnd_small();
    for (int i = 0; i < HID*NOUT + NOUT; i++) m[O_W2 + i] = rnd_small();
    return m;
  endfunction

  function automatic word_t relu(word_t v);
    return ($signed(v) > 0) ? v : '0;
  endfunction

  // one linear layer forward: z = W x + b
  function automatic void lin_fwd(ref img_t m, input word_t x[], input int pw, int pz, int ni, int no);
    for (int o = 0; o < no; o++) begin
      word_t acc = m[pw + no*ni + o];
      for (int i = 0; i < ni; i++) acc += fx_mul(m[pw + i*no + o], x[i]);
      m[pz + o] = acc;
    end
  endfunction

  // SGD step on sample (x, y); updates the image in place
  function automatic void train(ref img_t m, input word_t smp[]);
    word_t x0[], z0[], z1[], d[];
    word_t lr = m[HDR_LR];
    x0 = new[IN0]; foreach (x0[i]) x0[i] = smp[i];
    lin_fwd(m, x0, O_W0, O_Z0, IN0, HID);
    for (int k = 0; k < HID; k++) m[O_Z1 + k] = relu(m[O_Z0 + k]);
    z1 = new[HID]; foreach (z1[i]) z1[i] = m[O_Z1 + i];
    lin_fwd(m, z1, O_W2, O_Z2, HID, NOUT);
    // loss
    begin
      word_t l = '0;
      for (int k = 0; k < NOUT; k++) begin
        word_t df = smp[IN0 + k] - m[O_Z2 + k];
        l += fx_mul(df, df);
      end
      m[HDR_LOSS] = l;
      for (int k = 0; k < NOUT; k++) begin
        word_t df = smp[IN0 + k] - m[O_Z2 + k];
        m[O_DZ2 + k] = word_t'(-(df <<< 1));
      end
    end
    // layer 2 backward
    for (int i = 0; i < HID; i++)
      for (int o = 0; o < NOUT; o++) m[O_G2 + i*NOUT + o] = fx_mul(z1[i], m[O_DZ2 + o]);
    for (int o = 0; o < NOUT; o++) m[O_G2 + HID*NOUT + o] = m[O_DZ2 + o];
    for (int i = 0; i < HID; i++) begin
      word_t acc = '0;
      for (int o = 0; o < NOUT; o++) acc += fx_mul(m[O_W2 + i*NOUT + o], m[O_DZ2 + o]);
      m[O_DZ1 + i] = acc;
    end
    for (int k = 0; k < HID*NOUT; k++) m[O_W2 + k] += fx_mul(lr, m[O_G2 + k]);
    for (int k = 0; k < NOUT; k++) m[O_W2 + HID*NOUT + k] += fx_mul(lr, m[O_G2 + HID*NOUT + k]);
    // layer 1 (ReLU) backward
    for (int k = 0; k < HID; k++) m[O_DZ0 + k] = ($signed(m[O_Z0 + k]) > 0) ? m[O_DZ1 + k] : '0;
    // layer 0 backward (no input gradient for the first layer)
    for (int i = 0; i < IN0; i++)
      for (int o = 0; o < HID; o++) m[O_G0 + i*HID + o] = fx_mul(x0[i], m[O_DZ0 + o]);
    for (int o = 0; o < HID; o++) m[O_G0 + IN0*HID + o] = m[O_DZ0 + o];
    for (int k = 0; k < IN0*HID; k++) m[O_W0 + k] += fx_mul(lr, m[O_G0 + k]);
    for (int k = 0; k < HID; k++) m[O_W0 + IN0*HID + k] += fx_mul(lr, m[O_G0 + IN0*HID + k]);
  endfunction
endpackage
