// Sensing FSM controller of a Sensing-Electrode (SE).
//
// States: STANDBY after reset (front-end powered, ADC off), ACQ after a
// Syn-Sample broadcast (front-end and ADC on), SLEEP after a Sleep broadcast
// (front-end and ADC off). A Syn-Sample received in any state restarts the
// ADC through the A/D interface and restarts storage at address 0, so all SEs
// that hear the same broadcast sample in step.
//
// Storage is ping-pong over two single-port RAMs of BANK_DEPTH bytes: samples
// fill bank 0; when it is full the following samples go to bank 1, then back
// to bank 0. bank_full[b] is set when bank b has been filled and cleared when
// writing into it starts again. The collection address space is the two
// banks back to back: address bit log2(BANK_DEPTH) selects the bank; higher
// bits are ignored.
//
// Reads for the serial interface (rd_req/rd_addr) are served with one clock
// of RAM latency (rd_valid/rd_data); a read that collides with a sample write
// to the same bank waits one clock. The ping-pong switching follows the
// document; the state set, address map and arbitration are this design's.
module sensing_fsm
  import bio_pkg::*;
#(
  parameter int unsigned BANK_DEPTH = 128,
  localparam int unsigned BAW       = $clog2(BANK_DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // decoded commands from the serial interface
  input  logic                 cmd_valid,
  input  cmd_frame_t           cmd_frame,
  input  logic                 is_bcast,
  // A/D interface
  output logic                 acq_en,
  output logic                 afe_en,
  output logic                 adc_restart,
  input  logic                 sample_valid,
  input  logic [7:0]           sample,
  // collection reads
  input  logic                 rd_req,
  input  logic [MEMADDR_W-1:0] rd_addr,
  output logic                 rd_valid,
  output logic [7:0]           rd_data,
  // two sample RAMs
  output logic [1:0]           ram_en,
  output logic [1:0]           ram_we,
  output logic [BAW-1:0]       ram_addr [2],
  output logic [7:0]           ram_wdata,
  input  logic [7:0]           ram_rdata [2],
  // status
  output logic [1:0]           bank_full,
  output logic                 wr_bank,
  output logic [1:0]           state_o
);

  typedef enum logic [1:0] {ST_STANDBY, ST_ACQ, ST_SLEEP} sense_e;

  sense_e           state;
  logic [BAW-1:0]   wr_ptr;
  logic             rd_pend;
  logic [BAW:0]     rd_a;
  logic             rd_go, rd_bank_q;
  logic             wr_go;

  assign state_o = state;
  assign acq_en  = (state == ST_ACQ);
  assign afe_en  = (state != ST_SLEEP);

  assign wr_go = acq_en && sample_valid && !adc_restart;
  assign rd_go = rd_pend && !(wr_go && (rd_a[BAW] == wr_bank));
  assign ram_wdata = sample;

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      ram_en[b]   = 1'b0;
      ram_we[b]   = 1'b0;
      ram_addr[b] = '0;
      if (wr_go && wr_bank == 1'(b)) begin
        ram_en[b]   = 1'b1;
        ram_we[b]   = 1'b1;
        ram_addr[b] = wr_ptr;
      end else if (rd_go && rd_a[BAW] == 1'(b)) begin
        ram_en[b]   = 1'b1;
        ram_addr[b] = rd_a[BAW-1:0];
      end
    end
  end

  assign rd_data = ram_rdata[rd_bank_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_STANDBY;
      wr_ptr      <= '0;
      wr_bank     <= 1'b0;
      bank_full   <= '0;
      adc_restart <= 1'b0;
      rd_pend     <= 1'b0;
      rd_a        <= '0;
      rd_valid    <= 1'b0;
      rd_bank_q   <= 1'b0;
    end else begin
      adc_restart <= 1'b0;
      rd_valid    <= 1'b0;

      if (cmd_valid && is_bcast) begin
        unique case (cmd_frame.cmd)
          CMD_SYN_SAMPLE: begin
            state       <= ST_ACQ;
            adc_restart <= 1'b1;
            wr_ptr      <= '0;
            wr_bank     <= 1'b0;
            bank_full   <= '0;
          end
          CMD_SLEEP: state <= ST_SLEEP;
          default: ;
        endcase
      end else if (wr_go) begin
        if (wr_ptr == BAW'(BANK_DEPTH - 1)) begin
          wr_ptr              <= '0;
          wr_bank             <= ~wr_bank;
          bank_full[wr_bank]  <= 1'b1;
          bank_full[~wr_bank] <= 1'b0;
        end else begin
          wr_ptr <= wr_ptr + 1'b1;
        end
      end

      if (rd_req) begin
        rd_pend <= 1'b1;
        rd_a    <= rd_addr[BAW:0];
      end else if (rd_go) begin
        rd_pend <= 1'b0;
      end
      if (rd_go && !rd_req) begin
        rd_valid  <= 1'b1;
        rd_bank_q <= rd_a[BAW];
      end
    end
  end

  initial assert (BANK_DEPTH >= 2 && (1 << BAW) == BANK_DEPTH && BAW < MEMADDR_W)
    else $error("sensing_fsm: BANK_DEPTH must be a power of two that fits the frame address");

endmodule
