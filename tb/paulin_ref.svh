// paulin_ref.svh: cycle-level reference model of the Paulin data path with
// its non-scan BIST hardware, for the testbenches. Included inside a
// testbench module that has imported bist_pkg and defines W (32 here).
// It is written from the connection list of the data path (see
// paulin_nsbist) in plain procedural code: the model state is advanced by
// ref_clock() with the control word and inputs of the cycle.

typedef struct {
  logic [31:0] t1, t2, s1, s2;
  logic [31:0] r [1:7];
} paulin_state_t;

localparam reg_kind_e REF_KIND [1:7] = '{REG_PLAIN, REG_BILBO, REG_PLAIN, REG_PLAIN,
                                         REG_PLAIN, REG_BILBO, REG_BILBO};
localparam logic [31:0] REF_SEED1 = 32'h1, REF_SEED2 = 32'h2F5A_11C3;

function automatic logic [31:0] ref_times_x(input logic [31:0] s);
  logic [32:0] t;
  t = {s, 1'b0};
  if (t[32]) t = t ^ 33'h1_0040_0007;
  return t[31:0];
endfunction

function automatic logic [31:0] ref_reg_next(input reg_kind_e k, input bilbo_mode_e m,
                                              input logic [31:0] q, input logic [31:0] d,
                                              input logic si);
  if (k == REG_PLAIN) return (m == BILBO_NORMAL) ? d : q;
  case (m)
    BILBO_NORMAL: return d;
    BILBO_TPG:    return (q == 0) ? 32'h1 : ref_times_x(q);
    BILBO_MISR:   return ref_times_x(q) ^ d;
    BILBO_SHIFT:  return {q[30:0], si};
    BILBO_RESET:  return 32'h0;
    default:      return q;
  endcase
endfunction

// serial output of the register chain R1 -> ... -> R7
function automatic logic ref_scan_out(input paulin_state_t st, input logic si);
  logic so;
  so = si;
  for (int i = 1; i <= 7; i++) so = (REF_KIND[i] == REG_PLAIN) ? so : st.r[i][31];
  return so;
endfunction

function automatic paulin_state_t ref_clock(input paulin_state_t st, input paulin_ctrl_t c,
                                            input logic [31:0] pi1, input logic [31:0] pi2,
                                            input logic si);
  paulin_state_t nx;
  logic [31:0] x1, x2, m [1:11], add, mul1, mul2, sub;
  logic [31:0] d [1:7];
  logic so;
  x1 = c.tm1 ? st.t1 : pi1;
  x2 = c.tm2 ? st.t2 : pi2;
  m[5]  = c.msel[5]  ? st.r[6] : x1;
  m[4]  = c.msel[4]  ? st.r[2] : x2;
  m[6]  = c.msel[6]  ? st.r[1] : st.r[3];
  m[7]  = c.msel[7]  ? st.r[3] : st.r[5];
  m[8]  = c.msel[8]  ? st.r[1] : m[7];
  m[9]  = c.msel[9]  ? st.r[7] : st.r[5];
  m[10] = c.msel[10] ? st.r[2] : st.r[6];
  m[11] = c.msel[11] ? st.r[2] : st.r[7];
  add  = c.thru_add1  ? st.r[5] : m[6] + st.r[5];
  mul1 = c.thru_mult1 ? st.r[4] : 32'(64'(m[8]) * 64'(st.r[4]));
  mul2 = 32'(64'(m[9]) * 64'(m[10]));
  sub  = c.thru_sub1  ? st.r[6] : m[11] - st.r[6];
  m[1] = c.msel[1] ? 32'h1 : add;
  m[3] = c.msel[3] ? 32'h1 : add;
  m[2] = c.msel[2] ? 32'h1 : sub;
  d[1] = m[1]; d[2] = m[2]; d[3] = m[3]; d[4] = m[4]; d[5] = m[5]; d[6] = mul1; d[7] = mul2;
  nx = st;
  so = si;
  for (int i = 1; i <= 7; i++) begin
    nx.r[i] = ref_reg_next(REF_KIND[i], c.rmode[i], st.r[i], d[i], so);
    if (REF_KIND[i] != REG_PLAIN) so = st.r[i][31];
  end
  if (c.tpg_seed) begin
    nx.t1 = (REF_SEED1 == 0) ? 32'h1 : REF_SEED1;
    nx.t2 = (REF_SEED2 == 0) ? 32'h1 : REF_SEED2;
  end else begin
    if (c.tpg_en[0]) nx.t1 = ref_times_x(st.t1);
    if (c.tpg_en[1]) nx.t2 = ref_times_x(st.t2);
  end
  if (c.ra_clear) begin
    nx.s1 = 0; nx.s2 = 0;
  end else begin
    if (c.ra_en[0]) nx.s1 = ref_times_x(st.s1) ^ st.r[1];
    if (c.ra_en[1]) nx.s2 = ref_times_x(st.s2) ^ st.r[2];
  end
  return nx;
endfunction

function automatic paulin_state_t ref_reset();
  paulin_state_t st;
  st.t1 = 32'h1; st.t2 = 32'h1; st.s1 = 0; st.s2 = 0;
  for (int i = 1; i <= 7; i++) st.r[i] = 0;
  return st;
endfunction

// control word with every register holding and all test hardware idle
function automatic paulin_ctrl_t ctrl_idle();
  paulin_ctrl_t c;
  c = '0;
  for (int i = 1; i <= 7; i++) c.rmode[i] = BILBO_HOLD;
  return c;
endfunction

// session 1 of the schedule: Add.1 over its type-3 path (TPG1 -> R5,
// thru cycles loop R5 through Add.1 into R3, compute cycles add R3 and R5,
// R1 feeds RA1) together with Sub.1 over its type-3 path (BILBO R6
// generates; thru cycles loop R6 through Sub.1 into R2, compute cycles
// subtract R6 from R2 via m11, R2 feeds RA2).
// 'phase' 0 is a thru cycle, 1 a compute cycle.
function automatic paulin_ctrl_t ctrl_session1(input bit phase);
  paulin_ctrl_t c;
  c = ctrl_idle();
  c.tm1 = 1; c.tpg_en = 2'b01; c.ra_en = 2'b11;
  c.msel = '0;                       // m5 = PI1', m3/m1 = Add.1, m6 = R3, m2 = Sub.1
  c.msel[11] = 1'b1;                 // m11 = R2
  c.rmode[5] = BILBO_NORMAL;
  c.thru_add1 = !phase;
  c.rmode[3] = phase ? BILBO_HOLD : BILBO_NORMAL;
  c.rmode[1] = BILBO_NORMAL;
  c.rmode[6] = BILBO_TPG;
  c.thru_sub1 = !phase;
  c.rmode[2] = BILBO_NORMAL;
  return c;
endfunction

// session 2: Mult.1 (TPG1 via R5, TPG2 via R4, R6 compacts) together with
// Mult.2 (TPG1 via R5 and m9, R2 generates via m10, R7 compacts).
function automatic paulin_ctrl_t ctrl_session2();
  paulin_ctrl_t c;
  c = ctrl_idle();
  c.tm1 = 1; c.tm2 = 1; c.tpg_en = 2'b11;
  c.msel = '0;
  c.msel[10] = 1'b1;                 // m10 = R2
  c.rmode[5] = BILBO_NORMAL; c.rmode[4] = BILBO_NORMAL;
  c.rmode[6] = BILBO_MISR;   c.rmode[7] = BILBO_MISR;
  c.rmode[2] = BILBO_TPG;
  return c;
endfunction

// serial read-out of the BILBO signatures
function automatic paulin_ctrl_t ctrl_unload();
  paulin_ctrl_t c;
  c = ctrl_idle();
  c.rmode[2] = BILBO_SHIFT; c.rmode[6] = BILBO_SHIFT; c.rmode[7] = BILBO_SHIFT;
  return c;
endfunction
