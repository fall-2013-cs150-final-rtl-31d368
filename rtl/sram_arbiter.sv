// sram_arbiter: five-state Moore arbiter sharing one SRAM between two
// write ports (W0, W1) and two read ports (R0, R1).
//
// States IDLE, W0, W1, R0, R1. In a port's state the arbiter issues that
// port's request to the SRAM and pops it from the port (outputs depend on
// the state alone). Request conditions: S0 = w0_valid, S1 = w1_valid,
// S2 = r0_valid & !r0_data_full, S3 = r1_valid & !r1_data_full.
// Next state is round-robin in the order W0 -> W1 -> R0 -> R1 -> W0: from
// a port state the first requesting port after it is chosen; a port never
// follows itself directly (W0 -> IDLE -> W0), and with no request the
// machine returns to IDLE. From IDLE the priority is W0, W1, R0, R1.
// Read data returns on sram_rdata SRAM_LAT cycles after the read was
// issued and is steered to r0_data_valid or r1_data_valid by a tag pipe.
// A client's data_full must already count its reads in flight.
// Transition conditions follow the state diagram of the source design;
// the port signal bundles and the read-return tag pipe are this design's.
module sram_arbiter
  import dog_pkg::*;
#(
  parameter int unsigned SRAM_LAT = 2
) (
  input  logic               clk,
  input  logic               rst,
  // write ports
  input  logic               w0_valid,
  input  sram_wreq_t         w0_req,
  output logic               w0_pop,
  input  logic               w1_valid,
  input  sram_wreq_t         w1_req,
  output logic               w1_pop,
  // read ports
  input  logic               r0_valid,
  input  logic [SRAM_AW-1:0] r0_addr,
  input  logic               r0_data_full,
  output logic               r0_pop,
  output logic               r0_data_valid,
  input  logic               r1_valid,
  input  logic [SRAM_AW-1:0] r1_addr,
  input  logic               r1_data_full,
  output logic               r1_pop,
  output logic               r1_data_valid,
  output logic [SRAM_DW-1:0] rdata,
  // SRAM side
  output logic               sram_en,
  output logic               sram_we,
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [SRAM_DW-1:0] sram_wdata,
  output logic [SRAM_MW-1:0] sram_mask,
  input  logic [SRAM_DW-1:0] sram_rdata,
  output arb_state_e         state
);
  arb_state_e next;
  logic s0, s1, s2, s3;

  assign s0 = w0_valid;
  assign s1 = w1_valid;
  assign s2 = r0_valid && !r0_data_full;
  assign s3 = r1_valid && !r1_data_full;

  always_comb begin
    next = ARB_IDLE;
    unique case (state)
      ARB_IDLE: if (s0) next = ARB_W0; else if (s1) next = ARB_W1;
                else if (s2) next = ARB_R0; else if (s3) next = ARB_R1;
      ARB_W0:   if (s1) next = ARB_W1; else if (s2) next = ARB_R0;
                else if (s3) next = ARB_R1;
      ARB_W1:   if (s2) next = ARB_R0; else if (s3) next = ARB_R1;
                else if (s0) next = ARB_W0;
      ARB_R0:   if (s3) next = ARB_R1; else if (s0) next = ARB_W0;
                else if (s1) next = ARB_W1;
      ARB_R1:   if (s0) next = ARB_W0; else if (s1) next = ARB_W1;
                else if (s2) next = ARB_R0;
      default:  next = ARB_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= ARB_IDLE;
    else     state <= next;
  end

  // Moore outputs.
  assign w0_pop  = (state == ARB_W0);
  assign w1_pop  = (state == ARB_W1);
  assign r0_pop  = (state == ARB_R0);
  assign r1_pop  = (state == ARB_R1);
  assign sram_en = (state != ARB_IDLE);
  assign sram_we = w0_pop || w1_pop;

  always_comb begin
    sram_addr  = '0;
    sram_wdata = '0;
    sram_mask  = '0;
    unique case (state)
      ARB_W0: begin sram_addr = w0_req.addr; sram_wdata = w0_req.data; sram_mask = w0_req.mask; end
      ARB_W1: begin sram_addr = w1_req.addr; sram_wdata = w1_req.data; sram_mask = w1_req.mask; end
      ARB_R0: sram_addr = r0_addr;
      ARB_R1: sram_addr = r1_addr;
      default: ;
    endcase
  end

  // Read-return steering: {valid, port} travels SRAM_LAT cycles.
  logic [SRAM_LAT-1:0] tag_v, tag_p;
  always_ff @(posedge clk) begin
    if (rst) begin
      tag_v <= '0;
      tag_p <= '0;
    end else begin
      tag_v <= SRAM_LAT'({tag_v, (r0_pop || r1_pop)});
      tag_p <= SRAM_LAT'({tag_p, r1_pop});
    end
  end
  assign r0_data_valid = tag_v[SRAM_LAT-1] && !tag_p[SRAM_LAT-1];
  assign r1_data_valid = tag_v[SRAM_LAT-1] &&  tag_p[SRAM_LAT-1];
  assign rdata         = sram_rdata;

  // A port is only served while it has a request pending.
  a_w0: assert property (@(posedge clk) disable iff (rst) w0_pop |-> w0_valid);
  a_w1: assert property (@(posedge clk) disable iff (rst) w1_pop |-> w1_valid);
  a_r0: assert property (@(posedge clk) disable iff (rst) r0_pop |-> r0_valid);
  a_r1: assert property (@(posedge clk) disable iff (rst) r1_pop |-> r1_valid);
endmodule
