// svm_ref_pkg -- floating-point reference model used by the testbenches.
//
// Works directly from angles, independently of the fixed-point hardware: the
// sector comes from atan2, theta_sec from the sector's v_a direction, and the
// on-times from
//     tb/T = sqrt(3) * |v| sin(theta_sec),
//     ta/T = 3/2 * (|v| cos(theta_sec) - |v| sin(theta_sec)/sqrt(3)),
//     tz/T = 1 - ta/T - tb/T,
// with |v| normalised to the DC-link voltage.  Also gives the switching vector
// {a,b,c} of V0..V7 and the average space vector of a switching pattern.
package svm_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic real deg(real rad);
    return rad * 180.0 / PI;
  endfunction

  // sector 1..6 from the angle in degrees, ranges as [0,60), [60,120) ...
  function automatic int ref_sector(real vd, real vq);
    real th;
    th = deg($atan2(vq, vd));
    if (th >= 0.0   && th < 60.0)   return 1;
    if (th >= 60.0  && th < 120.0)  return 2;
    if (th >= 120.0 && th < 180.0)  return 3;
    if (th >= 180.0)                return 4;
    if (th >= -180.0 && th < -120.0) return 4;
    if (th >= -120.0 && th < -60.0) return 5;
    return 6;
  endfunction

  // angular distance (degrees) from the nearest sector boundary
  function automatic real boundary_dist(real vd, real vq);
    real th, m;
    th = deg($atan2(vq, vd)) + 360.0;
    m  = th - 60.0 * $floor(th / 60.0);
    return (m < 30.0) ? m : 60.0 - m;
  endfunction

  // switching vector of V_i, i = 0..7, as {a,b,c}
  function automatic logic [2:0] vec(int i);
    case (i)
      0: return 3'b000;  1: return 3'b100;  2: return 3'b110;  3: return 3'b010;
      4: return 3'b011;  5: return 3'b001;  6: return 3'b101;  default: return 3'b111;
    endcase
  endfunction

  // on-times as fractions of T; v_a is the adjacent vector with one switch on
  function automatic void ref_on_time(real vd, real vq, output real ta, output real tb,
                                      output real tz);
    real th, mag, phi_a, th_sec;
    int  s;
    s     = ref_sector(vd, vq);
    mag   = $sqrt(vd * vd + vq * vq);
    th    = deg($atan2(vq, vd));
    if (th < 0.0) th += 360.0;
    // v_a directions: sector 1,6 -> 0 (or 360); 2,3 -> 120; 4,5 -> 240
    case (s)
      1: th_sec = th;
      2: th_sec = 120.0 - th;
      3: th_sec = th - 120.0;
      4: th_sec = 240.0 - th;
      5: th_sec = th - 240.0;
      default: th_sec = (th == 0.0) ? 0.0 : 360.0 - th;
    endcase
    tb = $sqrt(3.0) * mag * $sin(th_sec * PI / 180.0);
    ta = 1.5 * (mag * $cos(th_sec * PI / 180.0) - mag * $sin(th_sec * PI / 180.0) / $sqrt(3.0));
    tz = 1.0 - ta - tb;
  endfunction

  // average space vector (normalised to Vdc) of a pattern held for given
  // on-fractions of the three legs: vd = 2/3 (a - b/2 - c/2), vq = (b - c)/sqrt(3)
  function automatic void avg_vector(real fa, real fb, real fc, output real vd, output real vq);
    vd = 2.0 / 3.0 * (fa - 0.5 * fb - 0.5 * fc);
    vq = (fb - fc) / $sqrt(3.0);
  endfunction

endpackage
