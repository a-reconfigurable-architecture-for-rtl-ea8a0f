// dwt2d_ctrl -- sequencer of the keyed multi-level 2-D wavelet transform.
//
// One frame is one complete operation in four phases:
//   LOAD  N*N pixels arrive in raster order on the pix_* handshake and are written to the
//         frame memory.
//   PASS  for level l = 0 .. LEVELS-1 on the top-left S x S block (S = N >> l), first a row
//         pass with alpha code 2l, then a column pass with alpha code 2l+1 (2*LEVELS filter
//         kernels, each with its own 8-bit alpha). Before each pass the filter is
//         reconfigured with its alpha and the sequencer waits until it is ready.
//         Each line (row or column) is copied to the line buffer (S reads), then streamed
//         through the filter with whole-sample symmetric extension (x(-i) = x(i),
//         x(S-1+i) = x(S-1-i)), S+8 samples in all. The low pass result of centre k is kept
//         for even k and written to position k/2, the high pass result for odd k goes to
//         S/2 + k/2, saturated to the memory width: the in-place Mallat layout.
//   OUT   the N*N coefficients are read in raster order of the output, each through the
//         subband re-orientation map (ro_r/ro_c out, src_r/src_c back), and appear on
//         coef_valid/coef_data one clock after the read.
//   DONE  done pulses for one clock.
// The line buffer lets a line be overwritten while it is still being filtered. The boundary
// extension and the line-buffer schedule are this design's choices.
//
// Cycle count: a line of S samples takes 2S + 14 clocks (S copy reads, S + 8 filter
// inputs, pipeline fill and drain); a filter reconfiguration between passes 53.
// A 512 x 512 frame with 6 levels takes 1,950,910 clocks including load and read-out.
module dwt2d_ctrl
  import pdwt_pkg::*;
#(
  parameter int unsigned N      = 512,
  parameter int unsigned LEVELS = 6,
  parameter int unsigned PIX_W  = 8,
  parameter int unsigned MEM_W  = 16,
  parameter int unsigned F_W    = MEM_W + 2,     // filter output width
  localparam int unsigned AW    = $clog2(N),
  localparam int unsigned NK    = 2 * LEVELS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  input  logic [ALPHA_W-1:0]      alpha [NK],
  // pixel input
  output logic                    pix_ready,
  input  logic                    pix_valid,
  input  logic [PIX_W-1:0]        pix_data,
  // frame memory
  output logic                    fm_we,
  output logic [2*AW-1:0]         fm_waddr,
  output logic [MEM_W-1:0]        fm_wdata,
  output logic                    fm_re,
  output logic [2*AW-1:0]         fm_raddr,
  input  logic [MEM_W-1:0]        fm_rdata,
  // line buffer
  output logic                    lb_we,
  output logic [AW-1:0]           lb_waddr,
  output logic [MEM_W-1:0]        lb_wdata,
  output logic                    lb_re,
  output logic [AW-1:0]           lb_raddr,
  input  logic [MEM_W-1:0]        lb_rdata,
  // filter
  output logic                    f_cfg_start,
  output logic [ALPHA_W-1:0]      f_cfg_alpha,
  input  logic                    f_cfg_busy,
  output logic                    f_in_valid,
  output logic [MEM_W-1:0]        f_in_data,
  input  logic                    f_out_valid,
  input  logic signed [F_W-1:0]   f_out_lo,
  input  logic signed [F_W-1:0]   f_out_hi,
  // re-orientation map
  output logic [AW-1:0]           ro_r,
  output logic [AW-1:0]           ro_c,
  input  logic [AW-1:0]           src_r,
  input  logic [AW-1:0]           src_c,
  // coefficient output
  output logic                    coef_valid,
  output logic [MEM_W-1:0]        coef_data
);

  initial begin
    assert ((N >> (LEVELS - 1)) >= 8) else $fatal(1, "dwt2d_ctrl: coarsest block below 8");
    assert ((1 << AW) == N) else $fatal(1, "dwt2d_ctrl: N must be a power of two");
  end

  typedef enum logic [2:0] {
    ST_IDLE, ST_LOAD, ST_CFG, ST_CFG_WAIT, ST_COPY, ST_FILT, ST_OUT, ST_DONE
  } state_e;

  state_e              state;
  logic [$clog2(LEVELS+1)-1:0] level;
  logic                dir;          // 0: row pass, 1: column pass
  logic [AW:0]         size;         // S
  logic [AW-1:0]       line;         // current row or column
  logic [2*AW:0]       cnt;          // element / sample / output counter
  logic [AW+3:0]       ocnt;         // filter outputs seen in this line
  logic                cp_v;         // copy read issued last cycle
  logic [AW-1:0]       cp_e;
  logic                fe_v;         // line-buffer read issued last cycle
  logic                out_v;        // frame read for output issued last cycle

  logic [2*AW-1:0] raster;
  assign raster = cnt[2*AW-1:0];

  assign size = (AW+1)'(N) >> level;

  // frame address of element e of the current line
  function automatic logic [2*AW-1:0] line_addr(logic d, logic [AW-1:0] ln, logic [AW-1:0] e);
    return d ? {e, ln} : {ln, e};
  endfunction

  // whole-sample symmetric extension of stream index p (sample p-4)
  function automatic logic [AW-1:0] reflect(logic [AW+2:0] p, logic [AW:0] s);
    logic signed [AW+3:0] t, sm;
    sm = $signed((AW+4)'(s));
    t  = $signed((AW+4)'(p)) - (AW+4)'(4);
    if (t < 0)        t = -t;
    else if (t >= sm) t = (sm <<< 1) - (AW+4)'(2) - t;
    return AW'(t);
  endfunction

  function automatic logic [MEM_W-1:0] sat(logic signed [F_W-1:0] v);
    if (v > $signed(F_W'((1 << (MEM_W - 1)) - 1))) return MEM_W'((1 << (MEM_W - 1)) - 1);
    if (v < -$signed(F_W'(1 << (MEM_W - 1))))      return MEM_W'(-(1 << (MEM_W - 1)));
    return MEM_W'(v);
  endfunction

  logic [AW+3:0] k;        // centre index of the current filter output
  assign k = ocnt - (AW+4)'(8);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      level <= '0;
      dir   <= 1'b0;
      line  <= '0;
      cnt   <= '0;
      ocnt  <= '0;
      cp_v  <= 1'b0;
      cp_e  <= '0;
      fe_v  <= 1'b0;
      out_v <= 1'b0;
    end else begin
      cp_v  <= 1'b0;
      fe_v  <= 1'b0;
      out_v <= 1'b0;
      case (state)
        ST_IDLE: if (start) begin
          state <= ST_LOAD;
          cnt   <= '0;
        end
        ST_LOAD: if (pix_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == (2*AW+1)'(N * N - 1)) begin
            state <= ST_CFG;
            level <= '0;
            dir   <= 1'b0;
          end
        end
        ST_CFG: state <= ST_CFG_WAIT;
        ST_CFG_WAIT: if (!f_cfg_busy) begin
          state <= ST_COPY;
          line  <= '0;
          cnt   <= '0;
        end
        ST_COPY: begin
          if (cnt < (2*AW+1)'(size)) begin
            cp_v <= 1'b1;
            cp_e <= AW'(cnt);
            cnt  <= cnt + 1'b1;
          end else if (!cp_v) begin
            state <= ST_FILT;
            cnt   <= '0;
            ocnt  <= '0;
          end
        end
        ST_FILT: begin
          if (cnt < (2*AW+1)'(size + 8)) begin
            fe_v <= 1'b1;
            cnt  <= cnt + 1'b1;
          end
          if (f_out_valid) begin
            ocnt <= ocnt + 1'b1;
            if (ocnt == (AW+4)'(size + 7)) begin   // last centre S-1 written now
              cnt <= '0;
              if (line != AW'(size - 1)) begin
                line  <= line + 1'b1;
                state <= ST_COPY;
              end else if (!dir) begin
                dir   <= 1'b1;
                state <= ST_CFG;
              end else if (level != ($bits(level))'(LEVELS - 1)) begin
                dir   <= 1'b0;
                level <= level + 1'b1;
                state <= ST_CFG;
              end else begin
                state <= ST_OUT;
              end
            end
          end
        end
        ST_OUT: begin
          out_v <= 1'b1;
          cnt   <= cnt + 1'b1;
          if (cnt == (2*AW+1)'(N * N - 1)) state <= ST_DONE;
        end
        ST_DONE: if (!out_v) state <= ST_IDLE;
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign busy      = (state != ST_IDLE);
  assign done      = (state == ST_DONE) && !out_v;
  assign pix_ready = (state == ST_LOAD);

  // filter reconfiguration
  assign f_cfg_start = (state == ST_CFG);
  assign f_cfg_alpha = alpha[2 * level + (($bits(level)+1)'(dir))];

  // re-orientation read-out position
  assign ro_r = raster[2*AW-1:AW];
  assign ro_c = raster[AW-1:0];

  // frame memory read port: copy reads or output reads
  always_comb begin
    fm_re    = 1'b0;
    fm_raddr = '0;
    if (state == ST_COPY && cnt < (2*AW+1)'(size)) begin
      fm_re    = 1'b1;
      fm_raddr = line_addr(dir, line, AW'(cnt));
    end else if (state == ST_OUT) begin
      fm_re    = 1'b1;
      fm_raddr = {src_r, src_c};
    end
  end

  // frame memory write port: pixel load or filter results
  always_comb begin
    fm_we    = 1'b0;
    fm_waddr = '0;
    fm_wdata = '0;
    if (state == ST_LOAD) begin
      fm_we    = pix_valid;
      fm_waddr = raster;
      fm_wdata = MEM_W'(pix_data);
    end else if (state == ST_FILT && f_out_valid && ocnt >= (AW+4)'(8)) begin
      fm_we = 1'b1;
      if (k[0]) begin
        fm_waddr = line_addr(dir, line, AW'((size >> 1) + (AW+1)'(k >> 1)));
        fm_wdata = sat(f_out_hi);
      end else begin
        fm_waddr = line_addr(dir, line, AW'(k >> 1));
        fm_wdata = sat(f_out_lo);
      end
    end
  end

  // line buffer
  assign lb_we    = cp_v;
  assign lb_waddr = cp_e;
  assign lb_wdata = fm_rdata;
  assign lb_re    = (state == ST_FILT) && (cnt < (2*AW+1)'(size + 8));
  assign lb_raddr = reflect(cnt[AW+2:0], size);

  // filter input
  assign f_in_valid = fe_v;
  assign f_in_data  = lb_rdata;

  // coefficient output
  assign coef_valid = out_v;
  assign coef_data  = fm_rdata;

endmodule
