// ctrl_model: behavioural model of one of the three redundant controllers
// and the program it runs, for testbenches only (not synthesizable).
//
// It follows the controller's state diagram: WAIT for an event; CONFIG on
// a host configuration command (takes the setpoint) and back to WAIT; START
// on a host start command (clears the pulse counter and the PID memory);
// EXEC on each timer interrupt while running (clears the counter on the
// edge where it reads the pulse count, computes the speed and a new PWM
// width with a PID law and writes it); STOP on a host stop command (writes width 0). Each state
// lasts one clock cycle. The host link itself is replaced by the host_cmd
// and cfg_setpoint_rpm inputs.
//
// Fault injection: while corrupt is high the write bus is XORed with
// corrupt_mask, as a soft error in this controller would do. recover_done
// answers recover_req once corrupt is released, standing for the
// controller being brought back into step with the other two.
module ctrl_model
  import motor_pkg::*;
#(
  parameter int  PERIOD = 5000,    // PWM period in clock cycles
  parameter real TM_S   = 0.1,     // sampling time
  parameter int  PPR    = 374,     // encoder pulses per revolution
  parameter real KP     = 0.002,   // duty per rpm
  parameter real KI     = 0.02,    // duty per rpm*s
  parameter real KD     = 0.0      // duty per rpm/s
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fit_irq,
  input  logic [COUNT_W-1:0] enc_count,
  input  logic [1:0]        host_cmd,          // 0 none, 1 config, 2 start, 3 stop
  input  int                cfg_setpoint_rpm,
  input  logic              corrupt,
  input  logic [CTRL_BUS_W-1:0] corrupt_mask,
  input  logic              recover_req,
  output ctrl_bus_t         bus,
  output logic              recover_done,
  output logic [2:0]        state,             // 0 wait 1 config 2 start 3 exec 4 stop
  output int                last_count,
  output int                last_width
);
  typedef enum logic [2:0] {S_WAIT, S_CONFIG, S_START, S_EXEC, S_STOP} state_e;

  state_e    st;
  ctrl_bus_t bus_int;
  bit        running;
  bit        irq_pending;
  real       setpoint, integ, e_prev;

  assign bus   = ctrl_bus_t'(bus_int ^ (corrupt ? corrupt_mask : '0));
  assign state = st;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_WAIT; bus_int <= '0; running = 0; irq_pending = 0;
      setpoint = 0.0; integ = 0.0; e_prev = 0.0;
      recover_done <= 1'b0; last_count <= 0; last_width <= 0;
    end else begin
      recover_done <= recover_req && !corrupt;
      bus_int <= '0;
      if (fit_irq) irq_pending = 1;
      case (st)
        S_WAIT: begin
          if (host_cmd == 2'd1)       st <= S_CONFIG;
          else if (host_cmd == 2'd2)  st <= S_START;
          else if (host_cmd == 2'd3)  st <= S_STOP;
          else if (irq_pending) begin
            irq_pending = 0;
            if (running) begin
              // clear the counter on the edge where EXEC reads it, so no
              // pulse falls between the read and the clear
              bus_int.cnt_clear <= 1'b1;
              st <= S_EXEC;
            end
          end
        end
        S_CONFIG: begin
          setpoint = real'(cfg_setpoint_rpm);
          st <= S_WAIT;
        end
        S_START: begin
          running = 1; integ = 0.0; e_prev = 0.0;
          bus_int.cnt_clear <= 1'b1;
          st <= S_WAIT;
        end
        S_EXEC: begin
          real rpm, e, u;
          int  w;
          rpm = real'(enc_count) * 60.0 / (real'(PPR) * TM_S);
          e   = setpoint - rpm;
          u   = KP * e + KI * (integ + e * TM_S) + KD * (e - e_prev) / TM_S;
          // integrate only while the output is not saturated (anti-windup)
          if (u > 0.0 && u < 1.0) integ = integ + e * TM_S;
          if (u < 0.0) u = 0.0;
          if (u > 1.0) u = 1.0;
          e_prev = e;
          w = int'(u * real'(PERIOD));
          last_count <= int'(enc_count);
          last_width <= w;
          bus_int.pwm_we    <= 1'b1;
          bus_int.pwm_width <= PWM_WIDTH_W'(w);
          st <= S_WAIT;
        end
        S_STOP: begin
          running = 0;
          bus_int.pwm_we    <= 1'b1;
          bus_int.pwm_width <= '0;
          st <= S_WAIT;
        end
        default: st <= S_WAIT;
      endcase
    end
  end
endmodule
