// cfftf_engine: forward complex FFT over an array of vectors, in binary64
// floating point, with a single base-2 butterfly (the floating-point FFT
// design whose arrays are placed as: TRIG, VA and VB in block RAM, the
// data array Y in one on-board memory bank used for both input and output).
//
// Y holds MVECS column vectors of length N = 2**log2n (N a power of two up
// to 2**LOG2N_MAX = 2048), column v starting CJUMP complex elements after
// column v-1. For each vector the engine
//   1. LOAD : copies the vector from the OBM bank into VA,
//   2. BFLY : runs one factor-2 pass, VA in, VB out, one butterfly every
//             two clocks (the two elements of a butterfly sit in the same
//             single-port block RAM, so they are read one per clock),
//   3. COPY : copies VB to VA before the next pass, and repeats 2-3 for all
//             log2n factors (no copy after the last),
//   4. STORE: writes VB back over the vector in the OBM bank.
// A pass with NBLOCK = 2**s blocks and stride INCREM = N / 2**(s+1) takes,
// for block k and element i of the block, x0 = VA[i + 2k*INCREM] and
// x1 = VA[x0 + INCREM] and writes x0 + x1 to VB[i + k*INCREM] and
// (x0 - x1) * TRIG[i * NBLOCK] to VB[i + k*INCREM + N/2]. This self-sorting
// order leaves the transform in natural order, with no bit reversal.
//
// From the source: one base-2 butterfly, 2 clocks per butterfly, the
// loop nest (vectors, factors, blocks, elements), TRIG/VA/VB in block RAM,
// one OBM bank, VB copied to VA between passes, 64-bit OBM words. This
// design's choices: the TRIG layout (TRIG[m] = exp(-2*pi*i*m/N),
// m < N/2, loaded by the host for the N in use), the self-sorting index
// order, a complex element stored as two OBM words (real part at the even
// address), a 1-clock OBM read latency, and the control.
//
// Interface: trig_we writes trig_data to TRIG[trig_addr] while idle.
// start (one clock, while idle) with log2n (1..LOG2N_MAX), mvecs (>= 1),
// cjump (>= N) and y_base sampled. OBM port: obm_re/obm_we with obm_addr
// (64-bit words); obm_rdata is valid the clock after obm_re. done pulses
// when the last vector is stored. state_o shows the current phase.
// Timing per vector: LOAD 2N+1, each pass N+3 (N/2 butterflies at 2
// clocks, 3 to drain), each copy N+1, STORE 2N+1 clocks.
module cfftf_engine
  import src6_pkg::*;
#(
  parameter int unsigned LOG2N_MAX = 11,
  parameter int unsigned AW        = OBM_AW,
  localparam int unsigned NMAX     = 1 << LOG2N_MAX
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // TRIG table load
  input  logic                   trig_we,
  input  logic [LOG2N_MAX-2:0]   trig_addr,
  input  cplx_t                  trig_data,
  // command
  input  logic                   start,
  input  logic [3:0]             log2n,
  input  logic [15:0]            mvecs,
  input  logic [AW-1:0]          cjump,
  input  logic [AW-1:0]          y_base,
  output logic                   busy,
  output logic                   done,
  output fft_state_e             state_o,
  // on-board memory bank
  output logic [AW-1:0]          obm_addr,
  output logic                   obm_re,
  output logic                   obm_we,
  output logic [OBM_DW-1:0]      obm_wdata,
  input  logic [OBM_DW-1:0]      obm_rdata
);
  localparam int unsigned LW = LOG2N_MAX;      // element index width

  fft_state_e state;
  assign state_o = state;
  assign busy    = (state != FFT_IDLE);

  // block RAMs
  cplx_t trig [NMAX/2];
  cplx_t va   [NMAX];
  cplx_t vb   [NMAX];

  // command registers
  logic [3:0]    n_log2;
  logic [15:0]   n_vecs, vec;
  logic [AW-1:0] stride2, vbase;
  logic [3:0]    pass;
  logic [LW+1:0] cnt;
  logic [LW:0]   n_elems;

  assign n_elems = (LW+1)'(1) << n_log2;

  // ---- butterfly addressing for the current pass ----
  logic [LW-1:0] bidx, ido_mask, i_in, k_blk, x0_a, x1_a, y0_a;
  logic [LW-2:0] tw_a;
  logic [3:0]    idosh;
  always_comb begin
    idosh    = n_log2 - 4'd1 - pass;
    bidx     = LW'(cnt[LW:1]);
    ido_mask = (LW'(1) << idosh) - LW'(1);
    i_in     = bidx & ido_mask;
    k_blk    = bidx >> idosh;
    x0_a     = i_in + (k_blk << (idosh + 4'd1));
    x1_a     = x0_a + (LW'(1) << idosh);
    y0_a     = i_in + (k_blk << idosh);
    tw_a     = (LW-1)'(i_in << pass);   // i * NBLOCK < N/2
  end

  // ---- block RAM ports ----
  logic          va_we, vb_we;
  logic [LW-1:0] va_waddr, va_raddr, vb_waddr, vb_raddr;
  cplx_t         va_wdata, vb_wdata, va_rdata, vb_rdata, trig_rdata;

  always_ff @(posedge clk) begin
    if (trig_we && state == FFT_IDLE) trig[trig_addr] <= trig_data;
    trig_rdata <= trig[tw_a];
    if (va_we) va[va_waddr] <= va_wdata;
    va_rdata <= va[va_raddr];
    if (vb_we) vb[vb_waddr] <= vb_wdata;
    vb_rdata <= vb[vb_raddr];
  end

  // ---- pipeline registers ----
  logic          p1_valid, p1_odd;       // a VA read is returning
  logic [LW-1:0] p1_y0;
  cplx_t         x0_q, y0_q, y1_q, bf_y0, bf_y1;
  logic          w0_valid, w1_valid;
  logic [LW-1:0] w_addr;
  logic          r_valid;                // OBM / VB read is returning
  logic [LW+1:0] r_idx;
  fp64_t         re_hold;

  fft_butterfly u_bfly (.x0(x0_q), .x1(va_rdata), .w(trig_rdata), .y0(bf_y0), .y1(bf_y1));

  always_comb begin
    va_raddr = (cnt[0]) ? x1_a : x0_a;
    vb_raddr = (state == FFT_STORE) ? LW'(cnt[LW+1:1]) : LW'(cnt);
    // VA writes: vector load (second word of an element) or copy from VB
    va_we    = 1'b0;
    va_waddr = LW'(r_idx[LW+1:1]);
    va_wdata = '{re: re_hold, im: obm_rdata};
    if (state == FFT_LOAD && r_valid && r_idx[0]) va_we = 1'b1;
    if (state == FFT_COPY && r_valid) begin
      va_we    = 1'b1;
      va_waddr = LW'(r_idx);
      va_wdata = vb_rdata;
    end
    // VB writes: butterfly results, y0 then y1 on the following clock
    vb_we    = w0_valid || w1_valid;
    vb_waddr = w0_valid ? w_addr : (w_addr + LW'(n_elems >> 1));
    vb_wdata = w0_valid ? y0_q : y1_q;
    // OBM
    obm_re    = (state == FFT_LOAD) && (cnt < {n_elems, 1'b0});
    obm_we    = (state == FFT_STORE) && r_valid;
    obm_addr  = obm_we ? (vbase + AW'(r_idx)) : (vbase + AW'(cnt));
    obm_wdata = r_idx[0] ? vb_rdata.im : vb_rdata.re;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= FFT_IDLE;
      done     <= 1'b0;
      cnt      <= '0;
      pass     <= '0;
      vec      <= '0;
      n_log2   <= 4'd1;
      n_vecs   <= '0;
      stride2  <= '0;
      vbase    <= '0;
      p1_valid <= 1'b0;
      p1_odd   <= 1'b0;
      w0_valid <= 1'b0;
      w1_valid <= 1'b0;
      r_valid  <= 1'b0;
      r_idx    <= '0;
      p1_y0    <= '0;
      w_addr   <= '0;
    end else begin
      done     <= 1'b0;
      p1_valid <= 1'b0;
      w0_valid <= 1'b0;
      w1_valid <= w0_valid;
      r_valid  <= 1'b0;
      case (state)
        FFT_IDLE: if (start) begin
          n_log2  <= log2n;
          n_vecs  <= mvecs;
          stride2 <= cjump << 1;
          vbase   <= y_base;
          vec     <= '0;
          cnt     <= '0;
          state   <= FFT_LOAD;
        end
        FFT_LOAD: begin
          if (obm_re) begin
            cnt     <= cnt + 1'b1;
            r_valid <= 1'b1;
            r_idx   <= cnt;
          end
          if (r_valid && r_idx == {n_elems, 1'b0} - 1'b1) begin
            state <= FFT_BFLY;
            pass  <= '0;
            cnt   <= '0;
          end
        end
        FFT_BFLY: begin
          cnt <= cnt + 1'b1;
          if (cnt < (LW+2)'(n_elems)) begin
            p1_valid <= 1'b1;
            p1_odd   <= cnt[0];
            p1_y0    <= y0_a;
          end
          if (p1_valid && p1_odd) begin
            w0_valid <= 1'b1;
            w_addr   <= p1_y0;
          end
          if (cnt == (LW+2)'(n_elems) + 2) begin
            cnt <= '0;
            if (pass == n_log2 - 4'd1) state <= FFT_STORE;
            else                       state <= FFT_COPY;
          end
        end
        FFT_COPY: begin
          cnt <= cnt + 1'b1;
          if (cnt < (LW+2)'(n_elems)) begin
            r_valid <= 1'b1;
            r_idx   <= cnt;
          end
          if (cnt == (LW+2)'(n_elems)) begin
            cnt   <= '0;
            pass  <= pass + 4'd1;
            state <= FFT_BFLY;
          end
        end
        FFT_STORE: begin
          cnt <= cnt + 1'b1;
          if (cnt < {n_elems, 1'b0}) begin
            r_valid <= 1'b1;
            r_idx   <= cnt;
          end
          if (cnt == {n_elems, 1'b0}) begin
            cnt <= '0;
            vec <= vec + 16'd1;
            if (vec + 16'd1 == n_vecs) begin
              state <= FFT_DONE;
            end else begin
              vbase <= vbase + stride2;
              state <= FFT_LOAD;
            end
          end
        end
        FFT_DONE: begin
          done  <= 1'b1;
          state <= FFT_IDLE;
        end
        default: state <= FFT_IDLE;
      endcase
    end
  end

  // data registers without reset (qualified by the valid bits above)
  always_ff @(posedge clk) begin
    if (state == FFT_LOAD && r_valid && !r_idx[0]) re_hold <= obm_rdata;
    if (p1_valid && !p1_odd) x0_q <= va_rdata;
    if (p1_valid && p1_odd) begin
      y0_q <= bf_y0;
      y1_q <= bf_y1;
    end
  end

  start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                               trig_we |-> state == FFT_IDLE);
  n_legal:    assert property (@(posedge clk) disable iff (!rst_n)
                               (start && state == FFT_IDLE) |->
                               (log2n >= 4'd1 && 32'(log2n) <= LOG2N_MAX && mvecs != '0));
endmodule
