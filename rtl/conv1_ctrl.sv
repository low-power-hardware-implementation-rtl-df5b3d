// conv1_ctrl -- sequencer of the Conv1/Pool1 engine.
//
// After a one-cycle start pulse it issues one kernel tap per cycle, with no
// gaps, until the frame is done. The loop order, outer to inner, is:
//   output channel ch, pooled row py, pooled column px,
//   pooling sub-row sy, sub-column sx, kernel row ky, kernel column kx.
// The conv output position is (oy, ox) = (py*POOL+sy, px*POOL+sx); the tap
// reads pixel (oy+ky, ox+kx) and weight (ch, ky, kx). Walking the four
// outputs of a pooling window back to back lets Pool1 run without line
// buffers. A frame takes exactly CH*(IMG-K+1)^2*K*K issue cycles whatever
// the sparsity, so latency does not depend on the data.
//
// Outputs are combinational from the loop counters and valid while
// issue_valid is high: img_addr, w_addr, first (first tap of a dot
// product), last (its last tap) and frame_last (final tap of the frame).
// start is ignored while busy.
// The document gives no schedule; this order is this design's choice.
module conv1_ctrl
  import conv1_pkg::*;
#(
  parameter int unsigned IMG = IMG_DIM,
  parameter int unsigned K   = K_DIM,
  parameter int unsigned CH  = N_CH,
  parameter int unsigned P   = POOL,
  parameter int unsigned IAW = $clog2(IMG * IMG),
  parameter int unsigned WAW = $clog2(CH * K * K)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           issue_valid,
  output logic [IAW-1:0] img_addr,
  output logic [WAW-1:0] w_addr,
  output logic           first,
  output logic           last,
  output logic           frame_last
);

  localparam int unsigned OUT = IMG - K + 1;   // conv map side
  localparam int unsigned PO  = OUT / P;       // pooled map side

  typedef enum logic { S_IDLE, S_RUN } state_e;
  state_e state;

  logic [7:0] ch, py, px, sy, sx, ky, kx;

  logic end_kx, end_ky, end_sx, end_sy, end_px, end_py, end_ch;
  assign end_kx = (32'(kx) == K - 1);
  assign end_ky = (32'(ky) == K - 1);
  assign end_sx = (32'(sx) == P - 1);
  assign end_sy = (32'(sy) == P - 1);
  assign end_px = (32'(px) == PO - 1);
  assign end_py = (32'(py) == PO - 1);
  assign end_ch = (32'(ch) == CH - 1);

  assign busy        = (state == S_RUN);
  assign issue_valid = (state == S_RUN);
  assign first       = (kx == 0) && (ky == 0);
  assign last        = end_kx && end_ky;
  assign frame_last  = issue_valid && last && end_sx && end_sy && end_px && end_py && end_ch;

  int unsigned oy, ox;
  assign oy       = 32'(py) * P + 32'(sy);
  assign ox       = 32'(px) * P + 32'(sx);
  assign img_addr = IAW'((oy + 32'(ky)) * IMG + ox + 32'(kx));
  assign w_addr   = WAW'(32'(ch) * K * K + 32'(ky) * K + 32'(kx));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      {ch, py, px, sy, sx, ky, kx} <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          {ch, py, px, sy, sx, ky, kx} <= '0;
        end
        S_RUN: begin
          if (frame_last) state <= S_IDLE;
          // nested counters, innermost first
          if (!end_kx) kx <= kx + 1'b1;
          else begin
            kx <= '0;
            if (!end_ky) ky <= ky + 1'b1;
            else begin
              ky <= '0;
              if (!end_sx) sx <= sx + 1'b1;
              else begin
                sx <= '0;
                if (!end_sy) sy <= sy + 1'b1;
                else begin
                  sy <= '0;
                  if (!end_px) px <= px + 1'b1;
                  else begin
                    px <= '0;
                    if (!end_py) py <= py + 1'b1;
                    else begin
                      py <= '0;
                      if (!end_ch) ch <= ch + 1'b1;
                      else         ch <= '0;
                    end
                  end
                end
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
