// hub_ref_pkg -- exact reference model of HUB floating-point addition, for
// the testbenches.
//
// ref_add() works out x + y or x - y with wide integers, independently of the
// adder's datapath: each operand's significand 1.f plus its ILSB is the odd
// integer (2^M + 2f + 1), scaled by its exponent relative to the smaller one
// (at most 2^EW, so 2112 bits suffice for EW <= 11).  The exact magnitude is
// normalised on its leading one and truncated to M bits, which is
// round-to-nearest in HUB format.  When nothing is truncated away (a tie) the
// model also returns the lower neighbour ("down"); a correct adder may
// return either, except that an unbiased adder must return the one whose LSB
// is 0 for aligned additions and for subtractions with |d| = 1 (must_even).
// Zero, overflow and underflow follow the adder's conventions: exponent 0 is
// zero, a zero operand returns the other, exact cancellation gives +0, too
// large an exponent saturates, too small flushes to +0.
package hub_ref_pkg;

  localparam int BW = 2112;

  typedef struct {
    logic [63:0] up;        // truncated result
    logic [63:0] down;      // lower tie neighbour (equals up if no tie)
    bit          tie;
    bit          must_even; // unbiased adder must pick the even-LSB neighbour
    bit          ovf_up;
    bit          unf_up;
    bit          ovf_down;
    bit          unf_down;
  } ref_t;

  function automatic logic [63:0] pack(input int ew, input int fw, input bit s,
                                       input int e, input logic [BW-1:0] k,
                                       output bit ovf, output bit unf);
    logic [63:0] w;
    ovf = 0; unf = 0;
    w = '0;
    if (e < 1) begin
      unf = 1;
    end else if (e > (1 << ew) - 1) begin
      ovf = 1;
      w = (64'(1) << (ew + fw)) - 1;
      w[ew+fw] = s;
    end else begin
      w = (64'(s) << (ew + fw)) | (64'(e) << fw) | (64'(k) & ((64'(1) << fw) - 1));
    end
    return w;
  endfunction

  function automatic ref_t ref_add(input int ew, input int fw, input logic [63:0] x,
                                   input logic [63:0] y, input bit op,
                                   input bit unbiased);
    ref_t r;
    int m, ex, ey, emin, p, sh, er;
    bit sx, sy, sr, eop;
    logic [BW-1:0] vx, vy, mag, k, rem;
    logic [63:0] fx, fy;
    logic [63:0] w;
    m  = fw + 1;
    sx = x[ew+fw];
    sy = y[ew+fw] ^ op;
    ex = int'((x >> fw) & ((64'(1) << ew) - 1));
    ey = int'((y >> fw) & ((64'(1) << ew) - 1));
    r.tie = 0; r.must_even = 0;
    r.ovf_up = 0; r.unf_up = 0; r.ovf_down = 0; r.unf_down = 0;
    if (ex == 0 && ey == 0) begin
      r.up = '0;
    end else if (ey == 0) begin
      r.up = x & ((64'(1) << (ew + fw + 1)) - 1);
    end else if (ex == 0) begin
      r.up = (y & ((64'(1) << (ew + fw)) - 1)) | (64'(sy) << (ew + fw));
    end else begin
      emin = (ex < ey) ? ex : ey;
      fx = x & ((64'(1) << fw) - 1);
      fy = y & ((64'(1) << fw) - 1);
      vx = ((BW'(1) << m) | (BW'(fx) << 1) | BW'(1)) << (ex - emin);
      vy = ((BW'(1) << m) | (BW'(fy) << 1) | BW'(1)) << (ey - emin);
      eop = sx ^ sy;
      if (!eop) begin
        mag = vx + vy; sr = sx;
      end else if (vx > vy) begin
        mag = vx - vy; sr = sx;
      end else if (vy > vx) begin
        mag = vy - vx; sr = sy;
      end else begin
        mag = '0; sr = 0;
      end
      if (mag == '0) begin
        r.up = '0;
      end else begin
        p = BW - 1;
        while (!mag[p]) p--;
        er = p - m + emin;
        sh = p - m + 1;
        if (sh > 0) begin
          k   = mag >> sh;
          rem = mag & ((BW'(1) << sh) - 1);
          r.tie = (rem == '0);
        end else begin
          k = mag << (-sh);
          r.tie = 1;
        end
        r.up = pack(ew, fw, sr, er, k, r.ovf_up, r.unf_up);
        if (r.tie) begin
          if (k != (BW'(1) << (m - 1)))
            r.down = pack(ew, fw, sr, er, k - 1, r.ovf_down, r.unf_down);
          else
            r.down = pack(ew, fw, sr, er - 1, (BW'(1) << m) - 1, r.ovf_down, r.unf_down);
          r.must_even = unbiased && ((eop && (ex - ey == 1 || ey - ex == 1)) || (!eop && ex == ey));
          // the even choice: keep up if its LSB is 0, else take down
          if (r.must_even) begin
            if (k[0]) begin
              r.up = r.down; r.ovf_up = r.ovf_down; r.unf_up = r.unf_down;
            end else begin
              r.down = r.up; r.ovf_down = r.ovf_up; r.unf_down = r.unf_up;
            end
          end
          return r;
        end
      end
    end
    r.down = r.up; r.ovf_down = r.ovf_up; r.unf_down = r.unf_up;
    return r;
  endfunction

endpackage
