// cpu_regs: microprocessor interface register file of the modulator.
//
// The source design has the microprocessor supply the power-control bits, the Walsh
// assignment of each channel, the gain (scaling) factors and the sector
// routing. This write-only register file holds them. Each write (cpu_we)
// takes effect on the next clock edge; the outputs are the registers.
// Address map (cpu_addr[11:10] selects the region; this design's choice):
//   0: slot table, entry cpu_addr[7:0] = sector*N_WALSH + Walsh code number
//        wdata[7:0] gain G, wdata[15:8] card index, wdata[16] enable
//   1: card config, card cpu_addr[7:0], word cpu_addr[9:8]
//        word 0: wdata[1:0] rate (rate_e), wdata[2] power-control bit
//        word 1: long code mask bits 31..0
//        word 2: long code mask bits 41..32 in wdata[9:0]
//   2: sector config, sector cpu_addr[1:0]
//        wdata[14:0] pilot PN offset in chips (applied at the next sync)
// Writes to indices outside the tables are ignored. Reset clears all
// registers: every slot disabled, every card at full rate with mask 0.
module cpu_regs
  import bsm_pkg::*;
#(
  parameter int unsigned N_CARDS   = 192,
  parameter int unsigned N_SECTORS = 3,
  parameter int unsigned N_WALSH   = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cpu_we,
  input  logic [11:0]       cpu_addr,
  input  logic [31:0]       cpu_wdata,
  output slot_cfg_t         slot_cfg  [N_SECTORS*N_WALSH],
  output card_cfg_t         card_cfg  [N_CARDS],
  output logic [PN_LEN-1:0] pn_offset [N_SECTORS]
);
  logic [1:0] region;
  logic [7:0] idx;
  logic [1:0] word;

  always_comb begin
    region = cpu_addr[11:10];
    word   = cpu_addr[9:8];
    idx    = cpu_addr[7:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_SECTORS*N_WALSH; i++) slot_cfg[i] <= '0;
      for (int i = 0; i < N_CARDS; i++)           card_cfg[i] <= '{rate: RATE_9600, pcb: 1'b0, mask: '0};
      for (int i = 0; i < N_SECTORS; i++)         pn_offset[i] <= '0;
    end else if (cpu_we) begin
      unique case (region)
        2'd0: if (32'(idx) < N_SECTORS*N_WALSH)
                slot_cfg[idx] <= '{en: cpu_wdata[16], card: cpu_wdata[15:8], gain: cpu_wdata[7:0]};
        2'd1: if (32'(idx) < N_CARDS)
                unique case (word)
                  2'd0: begin
                    card_cfg[idx].rate <= rate_e'(cpu_wdata[1:0]);
                    card_cfg[idx].pcb  <= cpu_wdata[2];
                  end
                  2'd1: card_cfg[idx].mask[31:0]  <= cpu_wdata;
                  2'd2: card_cfg[idx].mask[41:32] <= cpu_wdata[9:0];
                  default: ;
                endcase
        2'd2: if (32'(cpu_addr[1:0]) < N_SECTORS) pn_offset[cpu_addr[1:0]] <= cpu_wdata[PN_LEN-1:0];
        default: ;
      endcase
    end
  end
endmodule
