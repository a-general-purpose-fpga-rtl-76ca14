// tl_mode_delay: travelling-wave history of one propagation mode of a line.
//
// A line is split into decoupled modes (the phase/mode transformations sit
// in the network matrix). For one mode with ends k and m, modal voltages v_k,
// v_m and characteristic conductance Gc, the Bergeron model makes each end a
// conductance Gc in parallel with a history source. Each step the unit stores
// the wave leaving each end,
//   s_k(n) = 2*Gc*v_k(n) + I_k(n),   s_m(n) = 2*Gc*v_m(n) + I_m(n),
// in a delay memory, and forms the sources of the next step from the waves
// that left tau = (dly + frac) steps earlier:
//   I_k(n+1) = -(k_far * s_m(n+1-tau) + k_near * s_k(n+1-tau))
//   I_m(n+1) = -(k_far * s_k(n+1-tau) + k_near * s_m(n+1-tau))
// k_far = 1, k_near = 0 gives the lossless line; other weights give the
// usual constant-parameter line with lumped series resistance. A delay that is
// not a whole number of steps is linearly interpolated between the stored
// samples n+1-dly and n-dly. The delay memory and the interpolation follow the
// document; linear interpolation, the loss weights and the memory layout are
// this design's choices. Samples older than the start of the run read as zero.
//
// Timing: upd is pulsed once per step when x(n) is valid. The unit writes the
// memory in that cycle, reads the two delayed samples in the next two, and
// presents inj_k = I_k(n+1), inj_m = I_m(n+1) with a done pulse 4 cycles
// after upd. Requires 1 <= dly <= DEPTH-2 and DEPTH a power of two.
module tl_mode_delay
  import rts_pkg::*;
#(
  parameter int N_X   = 18,
  parameter int DEPTH = 256   // delay memory length in steps
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clr,
  input  logic    upd,
  input  tl_cfg_t cfg,
  input  fx_t     x [N_X],
  output fx_t     inj_k,
  output fx_t     inj_m,
  output logic    done
);

  localparam int AW = $clog2(DEPTH);

  typedef struct packed { fx_t sk; fx_t sm; } wave_t;

  wave_t mem [DEPTH];

  fx_t v_k, v_m;
  branch_voltage #(.N_X(N_X)) u_vk (.x(x), .p(cfg.vk), .q(IDX_NONE), .v(v_k));
  branch_voltage #(.N_X(N_X)) u_vm (.x(x), .p(cfg.vm), .q(IDX_NONE), .v(v_m));

  wave_t w_new;
  assign w_new.sk = fx_mul(cfg.g2, v_k) + inj_k;
  assign w_new.sm = fx_mul(cfg.g2, v_m) + inj_m;

  typedef enum logic [1:0] {S_IDLE, S_RD1, S_RD2, S_RD3} state_e;
  state_e state;

  logic [AW-1:0] wptr, raddr;
  logic [AW:0]   nwr;             // samples written, saturating at DEPTH
  logic          we;
  wave_t         rdata, r1;
  logic          ok1, ok2;

  assign we = (state == S_IDLE) && upd && !clr;

  // delay memory, one write and one read port
  always_ff @(posedge clk) begin
    if (we) mem[wptr] <= w_new;
    rdata <= mem[raddr];
  end

  always_comb begin
    raddr = wptr - AW'(cfg.dly);                 // sample n+1-dly
    if (state == S_RD2) raddr = raddr - 1'b1;    // sample n-dly
  end

  // interpolation between the two samples
  wave_t r2, s;
  assign r2 = ok2 ? rdata : '0;
  assign s.sk = r1.sk + fx_mul(cfg.frac, r2.sk - r1.sk);
  assign s.sm = r1.sm + fx_mul(cfg.frac, r2.sm - r1.sm);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      wptr  <= '0;
      nwr   <= '0;
      inj_k <= '0;
      inj_m <= '0;
      r1    <= '0;
      ok1   <= 1'b0;
      ok2   <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (clr) begin
        state <= S_IDLE;
        wptr  <= '0;
        nwr   <= '0;
        inj_k <= '0;
        inj_m <= '0;
      end else begin
        unique case (state)
          S_IDLE: if (upd) begin
            wptr  <= wptr + 1'b1;
            if (int'(nwr) < DEPTH) nwr <= nwr + 1'b1;
            state <= S_RD1;
          end
          S_RD1: begin
            ok1   <= int'(nwr) >= int'(cfg.dly);
            ok2   <= int'(nwr) >= int'(cfg.dly) + 1;
            state <= S_RD2;
          end
          S_RD2: begin
            r1    <= ok1 ? rdata : '0;
            state <= S_RD3;
          end
          S_RD3: begin
            inj_k <= -(fx_mul(cfg.k_far, s.sm) + fx_mul(cfg.k_near, s.sk));
            inj_m <= -(fx_mul(cfg.k_far, s.sk) + fx_mul(cfg.k_near, s.sm));
            done  <= 1'b1;
            state <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  a_delay_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  upd |-> (cfg.dly >= 1 && int'(cfg.dly) <= DEPTH - 2));

endmodule
