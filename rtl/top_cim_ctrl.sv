// top_cim_ctrl: DNN-mode controller of a core (weight control and bitcell control). When started
// by a mode switch it computes NOUT output channels, one after the other. For channel n it reads
// weight entry WBASE+n from the weight SRAM and spends eight cycles driving one bit plane of the
// 32 weights onto the DAMEM rows, most significant bit first (the CCU adder trees
// shift-accumulate, subtracting the sign-bit plane). A ninth cycle reads the partial sum of DOMEM
// row OBASE+n, lets the CCUs apply scale, partial-sum add and activation, and writes the four
// lane results (enabled lanes only) into that row. `done` pulses for one cycle after the last
// channel, which returns the core to CPU mode. Throughput: 9 cycles per channel per core, each
// giving four 32-term 8b x 8b dot products. The bit-serial weight order and the 9-cycle schedule
// are this design's reading of the adder tree's shift-accumulate path.
module top_cim_ctrl
  import gpcim_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  word_t [N_CSR-1:0]     csr,
  output logic [6:0]            ws_addr,
  input  logic [WS_WIDTH-1:0]   ws_rdata,
  output dnn_ctl_t              dc,
  output logic                  busy,
  output logic                  done
);
  typedef enum logic [1:0] {S_IDLE, S_MAC, S_WB} state_e;
  state_e     state;
  logic [6:0] n;
  logic [2:0] wbit;
  logic [6:0] row;

  assign row     = csr[CSR_OBASE][6:0] + n;
  assign ws_addr = csr[CSR_WBASE][6:0] + n;
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      n     <= '0;
      wbit  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          n    <= '0;
          wbit <= 3'd7;
          if (csr[CSR_NOUT] == '0) done  <= 1'b1;
          else                     state <= S_MAC;
        end
        S_MAC: begin
          wbit <= wbit - 3'd1;
          if (wbit == 3'd0) state <= S_WB;
        end
        S_WB: begin
          if (32'(n) + 1 >= csr[CSR_NOUT]) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            n     <= n + 7'd1;
            wbit  <= 3'd7;
            state <= S_MAC;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int r = 0; r < DA_ROWS; r++)
      dc.wl_weight[r] = (state == S_MAC) && ws_rdata[WGT_W*r + int'(wbit)];
    dc.bank      = csr[CSR_BANK][0];
    dc.first     = (state == S_MAC) && (wbit == 3'd7);
    dc.step      = (state == S_MAC);
    dc.neg       = (state == S_MAC) && (wbit == 3'd7);
    dc.acc_en    = csr[CSR_TACC][0];
    dc.relu_en   = csr[CSR_ACT][0];
    dc.shift     = csr[CSR_SCALE][4:0];
    dc.psum_addr = row;
    dc.lat_m_en  = (state == S_WB);
    dc.wr_en     = (state == S_WB);
    dc.wr_lane   = csr[CSR_TEN][LANES-1:0];
    dc.wr_addr   = row;
  end
endmodule
