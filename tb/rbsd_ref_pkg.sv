// rbsd_ref_pkg: reference model of carry-free RBSD addition for the
// testbenches, written from the arithmetic rules rather than from the cell
// equations.
//
// For one digit position with operand digits x, y in {-1,0,+1}:
//   z = x + y is split as z = 2*c_next + w with w in {-1,0,+1}.
//   m_next = 1 when neither x nor y is +1. Then the transfer c_next that this
//   position sends up is in {-1,0}; otherwise it is in {0,+1}.
//   For odd z the interim digit w takes the sign that cannot overflow with the
//   transfer arriving from below: w = +1 when m (of the position below) is 1,
//   w = -1 when it is 0. Even z gives w = 0.
//   The cells carry the transfer as b = c + m (a single bit), and the sum
//   digit is s = w + c_in.
package rbsd_ref_pkg;

  typedef struct {
    bit m_next;
    bit b_next;
    int s;
  } cell_ref_t;

  function automatic cell_ref_t cell_ref(int x, int y, bit m_in, bit b_in);
    cell_ref_t r;
    int z, w, c_next, c_in;
    z = x + y;
    r.m_next = (x <= 0) && (y <= 0);
    if (z == 1 || z == -1) w = m_in ? 1 : -1;
    else                   w = 0;
    c_next = (z - w) / 2;
    r.b_next = bit'(c_next + int'(r.m_next));
    c_in = int'(b_in) - int'(m_in);
    r.s = w + c_in;
    return r;
  endfunction

  // Digit-by-digit reference of a whole adder: x, y hold digit values,
  // index 0 least significant. Returns the n+1 expected sum digits (the top
  // one is the transfer c_n = b_n - m_n) and counts, in stats, how often each
  // rule of the addition fired.
  typedef struct {
    int carry_pos;    // a position sent a +1 transfer upwards
    int carry_neg;    // a position sent a -1 transfer upwards
    int odd_m1;       // odd digit sum resolved with w = +1 (m from below = 1)
    int odd_m0;       // odd digit sum resolved with w = -1 (m from below = 0)
    int top_pos;      // the transfer out of the top position was +1
    int top_neg;      // the transfer out of the top position was -1
  } add_stats_t;

  function automatic void add_ref(input int x[], input int y[],
                                  output int s[], inout add_stats_t st);
    bit m = 0, b = 0;
    int n = x.size();
    s = new[n + 1];
    for (int i = 0; i < n; i++) begin
      cell_ref_t r = cell_ref(x[i], y[i], m, b);
      int c = int'(r.b_next) - int'(r.m_next);
      if (c > 0) st.carry_pos++;
      if (c < 0) st.carry_neg++;
      if ((x[i] + y[i]) % 2 != 0) begin
        if (m) st.odd_m1++;
        else   st.odd_m0++;
      end
      s[i] = r.s;
      m = r.m_next;
      b = r.b_next;
    end
    s[n] = int'(b) - int'(m);
    if (s[n] > 0) st.top_pos++;
    if (s[n] < 0) st.top_neg++;
  endfunction

  // Value of a digit vector, sum of d_i * 2^i.
  function automatic longint value_of(input int d[]);
    longint v = 0;
    for (int i = d.size() - 1; i >= 0; i--) v = 2 * v + longint'(d[i]);
    return v;
  endfunction

endpackage
