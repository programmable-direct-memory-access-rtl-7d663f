// dma_halt_ctrl -- CPU halt and transfer-start control.
//
// The controller takes the bus by halting the CPU. halt_cpu is raised while
// the bus engine is busy and whenever a channel requests a transfer that is
// allowed to start. With DMARMWDIS=1 a transfer may not start while the CPU
// signals a read-modify-write in progress (cpu_rmw), so the CPU finishes it
// first; with DMARMWDIS=0 the CPU is halted at once. cpu_run marks the cycles
// the CPU owns the bus, which the burst-block channels count for their CPU
// slots. An NMI event (rising edge of nmi) aborts transfers only when
// ENNMI=1: nmi_abort is then a one-cycle pulse.
// The DMARMWDIS and ENNMI behaviour follows the controller description;
// taking the NMI as an edge and the purely combinational halt path are this
// design's choices. Timing: halt_cpu follows its inputs in the same cycle;
// nmi_abort comes one cycle after nmi rises.
module dma_halt_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic any_req,      // some channel requests a transfer
  input  logic engine_busy,  // bus engine has a transfer in flight
  input  logic rmwdis,       // DMARMWDIS
  input  logic cpu_rmw,      // CPU is in a read-modify-write
  input  logic ennmi,        // ENNMI
  input  logic nmi,          // non-maskable interrupt line
  output logic start_ok,     // a new transfer may start
  output logic halt_cpu,     // Halt CPU
  output logic cpu_run,      // CPU owns the bus this cycle
  output logic nmi_abort     // abort pulse to the channels
);

  logic nmi_q, nmi_qq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nmi_q  <= 1'b0;
      nmi_qq <= 1'b0;
    end else begin
      nmi_q  <= nmi;
      nmi_qq <= nmi_q;
    end
  end

  always_comb begin
    start_ok  = engine_busy | ~(rmwdis & cpu_rmw);
    halt_cpu  = engine_busy | (any_req & start_ok);
    cpu_run   = ~halt_cpu;
    nmi_abort = ennmi & nmi_q & ~nmi_qq;
  end

endmodule
