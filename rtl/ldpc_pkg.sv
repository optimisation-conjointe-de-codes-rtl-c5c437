// ldpc_pkg -- shared types and arithmetic of the QC-IRA LDPC coder/decoder.
//
// The code family is quasi-cyclic irregular repeat-accumulate: H = [Hs Hp], where Hs is an
// MB x KB array of z x z circulants I_delta (the identity right-shifted by delta) and Hp is
// dual-diagonal, i.e. an accumulator. Row l of circulant I_delta has its one in column
// (l + delta) mod z. The base shift table below is the 3 x 3, z = 8 example code built by the
// cycle-avoiding design procedure (delta0..delta8 = 0,6,3, 0,7,1, 0,3,6 column by column).
// For z a multiple of 8 the table is scaled by z/8; for larger base matrices it is repeated.
// Both extensions are this design's own choice.
//
// Quantisation: channel LLRs on 4 bits (+/-7) as in the document; internal messages on 6 bits
// (+/-31) and a-posteriori sums A_v on 8 bits (+/-127) are this design's choice. All
// saturation is symmetric so that the magnitude of any message fits its width.
// LLR sign convention: a positive value favours bit 0.
package ldpc_pkg;

  localparam int LLR_W = 4;   // channel values, +/-7
  localparam int MSG_W = 6;   // extrinsic messages and trellis metrics, +/-31
  localparam int APP_W = 8;   // a-posteriori sums A_v, +/-127

  localparam int MSG_MAX = (1 << (MSG_W - 1)) - 1;
  localparam int APP_MAX = (1 << (APP_W - 1)) - 1;

  typedef logic signed [LLR_W-1:0] llr_t;
  typedef logic signed [MSG_W-1:0] msg_t;
  typedef logic signed [APP_W-1:0] app_t;

  // Phases of a decoding processor.
  typedef enum logic [2:0] {
    ST_IDLE,  // waiting for a frame in the input memory
    ST_INIT,  // copy systematic channel values into the a-posteriori banks
    ST_FWD,   // forward pass of one window
    ST_BWD,   // backward pass of one window
    ST_OUT,   // read out hard decisions
    ST_PIPE   // pipelined decoder: backward pass of one window and forward pass of the next
  } dec_state_t;

  // Saturate a wide value to the message range.
  function automatic msg_t sat_msg(input int v);
    if (v > MSG_MAX) return msg_t'(MSG_MAX);
    if (v < -MSG_MAX) return msg_t'(-MSG_MAX);
    return msg_t'(v);
  endfunction

  // Saturate a wide value to the a-posteriori range.
  function automatic app_t sat_app(input int v);
    if (v > APP_MAX) return app_t'(APP_MAX);
    if (v < -APP_MAX) return app_t'(-APP_MAX);
    return app_t'(v);
  endfunction

  function automatic logic [MSG_W-1:0] mag(input msg_t v);
    return v[MSG_W-1] ? MSG_W'(-v) : MSG_W'(v);
  endfunction

  // Min-sum "box-plus" of two messages: sign product, smaller magnitude.
  function automatic msg_t boxplus(input msg_t a, input msg_t b);
    logic [MSG_W-1:0] m;
    m = (mag(a) < mag(b)) ? mag(a) : mag(b);
    return (a[MSG_W-1] ^ b[MSG_W-1]) ? msg_t'(-m) : msg_t'(m);
  endfunction

  // Circulant shift delta(i, j) of block row i, block column j for circulant size z.
  function automatic int delta(input int i, input int j, input int z);
    int base;
    case ((i % 3) * 3 + (j % 3))
      0: base = 0;  1: base = 0;  2: base = 0;
      3: base = 6;  4: base = 7;  5: base = 3;
      6: base = 3;  7: base = 1;  default: base = 6;
    endcase
    if (z % 8 == 0) return (base * (z / 8)) % z;
    return base % z;
  endfunction

endpackage
